// tb_uart_tx: frames sent are sampled in the middle of each bit by the testbench.
module tb_uart_tx;
  localparam int DIV = 30;
  logic clk = 0, rst_n = 0, start = 0, ready, txd;
  logic [7:0] data = 0;
  int checks = 0, failures = 0;

  uart_tx #(.DIV(DIV)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    @(negedge clk);
    chk(txd == 1 && ready, "idle high and ready");
    for (int n = 0; n < 20; n++) begin
      logic [7:0] b, r;
      int t;
      b = 8'($urandom);
      wait (ready);
      @(negedge clk); start = 1; data = b;
      @(negedge clk); start = 0;
      // line went low at the clock edge; sample at the middle of each bit
      repeat (DIV / 2 - 1) @(negedge clk);
      chk(txd == 0, "start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (DIV) @(negedge clk);
        r[i] = txd;
      end
      repeat (DIV) @(negedge clk);
      chk(txd == 1, "stop bit");
      chk(r == b, $sformatf("byte %h sent as %h", b, r));
      chk(!ready, "busy until the stop bit ends");
      t = 0;
      while (!ready) begin @(negedge clk); t++; end
      chk(t >= DIV / 2 - 2 && t <= DIV / 2 + 2, $sformatf("frame length (%0d)", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
