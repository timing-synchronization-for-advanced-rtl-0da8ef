// tb_pc_serial_out: packets from a FIFO model come out as 16 serial bytes, MSB first.
module tb_pc_serial_out;
  localparam int DIV = 20;
  logic clk = 0, rst_n = 0, fifo_empty, fifo_pop, txd, busy;
  logic [127:0] fifo_data;
  logic [127:0] q[$];
  logic [7:0] bytes[$];
  int checks = 0, failures = 0;

  pc_serial_out #(.DIV(DIV)) dut (.*);
  always #5 clk = ~clk;
  assign fifo_empty = (q.size() == 0);
  assign fifo_data  = fifo_empty ? '0 : q[0];
  always @(posedge clk) if (rst_n && fifo_pop && !fifo_empty) void'(q.pop_front());

  // serial receiver model: sample mid-bit
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge txd);
      repeat (DIV / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (DIV) @(posedge clk);
        b[i] = txd;
      end
      repeat (DIV) @(posedge clk);
      if (txd) bytes.push_back(b);
    end
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

  initial begin
    logic [127:0] sent[3];
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 3; i++) begin
      sent[i] = {$urandom, $urandom, $urandom, $urandom};
      q.push_back(sent[i]);
    end
    repeat (3 * 16 * 10 * DIV + 200) @(negedge clk);
    chk(bytes.size() == 48, $sformatf("48 bytes (%0d)", bytes.size()));
    for (int i = 0; i < 3; i++)
      for (int k = 0; k < 16; k++)
        if (bytes.size() == 48)
          chk(bytes[16 * i + k] == sent[i][127 - 8 * k -: 8], "byte order MSB first");
    chk(q.size() == 0 && !busy, "all sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
