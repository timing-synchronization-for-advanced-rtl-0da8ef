// tb_uart_rx: bit-banged frames at DIV cycles per bit, with and without rate error,
// a frame with a bad stop bit and a start-bit glitch.
module tb_uart_rx;
  localparam int DIV = 40;
  logic clk = 0, rst_n = 0, rxd = 1, valid, frame_err;
  logic [7:0] data;
  int checks = 0, failures = 0, nvalid = 0, nerr = 0;
  logic [7:0] last;

  uart_rx #(.DIV(DIV)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (valid) begin nvalid++; last = data; end
    if (frame_err) nerr++;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame(input logic [7:0] b, input int bitlen, input bit stop);
    logic [9:0] f;
    f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rxd = f[i];
      repeat (bitlen) @(negedge clk);
    end
    rxd = 1;
    repeat (bitlen) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    repeat (50) @(negedge clk);
    for (int i = 0; i < 60; i++) begin
      logic [7:0] b;
      int n0;
      b  = 8'($urandom);
      n0 = nvalid;
      frame(b, (i % 3 == 0) ? DIV + 1 : (i % 3 == 1) ? DIV - 1 : DIV, 1);
      chk(nvalid == n0 + 1 && last == b, $sformatf("byte %h received %h", b, last));
    end
    frame(8'h5A, DIV, 0);
    chk(nerr == 1, "bad stop bit reported");
    // glitch shorter than half a bit
    rxd = 0; repeat (DIV / 4) @(negedge clk); rxd = 1;
    repeat (12 * DIV) @(negedge clk);
    chk(nvalid == 60 && nerr == 1, "glitch ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
