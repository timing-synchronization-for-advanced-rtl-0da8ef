// tb_pwm_decoder: drives pulses of known width and checks the decoded symbols and LOS.
module tb_pwm_decoder;
  import timing_pkg::*;
  logic clk = 0, rst_n = 0, line = 0;
  logic rise, sym_valid, los;
  sym_t sym;
  int checks = 0, failures = 0;
  sym_t exp_q[$];
  int rises = 0;

  pwm_decoder #(.LOS_CYC(64)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rise) rises++;
    if (sym_valid) begin
      sym_t e;
      if (exp_q.size() == 0) chk(0, "unexpected symbol");
      else begin
        e = exp_q.pop_front();
        chk(sym == e, $sformatf("symbol %0d expected %0d", sym, e));
      end
    end
  end

  task automatic pulse(input int hi);
    @(negedge clk);
    line = 1;
    repeat (hi) @(negedge clk);
    line = 0;
    repeat (8 - hi - 1) @(negedge clk);
  endtask

  initial begin
    int n = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    repeat (100) @(negedge clk);
    chk(los == 1, "los with no signal");
    for (int i = 0; i < 300; i++) begin
      int k, hi;
      k  = $urandom_range(0, 2);
      hi = (k == 0) ? 4 : (k == 1) ? 6 : 2;
      // jitter of one sample on some pulses
      if (i % 7 == 3) hi += (k == 2) ? -1 : 1;
      exp_q.push_back(k == 0 ? SYM_ZERO : k == 1 ? SYM_POS : SYM_NEG);
      pulse(hi);
      n++;
      if (i > 2) begin checks++; if (los) begin failures++; $display("FAIL los while active"); end end
    end
    repeat (10) @(negedge clk);
    chk(exp_q.size() == 0, $sformatf("all symbols decoded, %0d left", exp_q.size()));
    chk(rises == n, "one rise per bit");
    repeat (80) @(negedge clk);
    chk(los == 1, "los after signal stops");
    pulse(4);
    exp_q.push_back(SYM_ZERO);
    repeat (4) @(negedge clk);
    chk(los == 0, "los clears on an edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
