// tb_pwm_encoder: checks pulse widths, sign alternation and forced marker symbols.
module tb_pwm_encoder;
  import timing_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, bit_val = 0, force_en = 0;
  sym_t force_sym = SYM_ZERO, sym_sent;
  logic line;
  int checks = 0, failures = 0;

  pwm_encoder dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // send one bit, measure the high time over the 8-cycle period
  task automatic send(input bit b, input bit f, input sym_t fs, output int width, output bit rose);
    @(negedge clk);
    start = 1; bit_val = b; force_en = f; force_sym = fs;
    @(negedge clk);
    start = 0;
    rose  = line;
    width = 0;
    for (int i = 0; i < 8; i++) begin
      width += line;
      if (i < 7) @(negedge clk);
    end
  endtask

  initial begin
    int w, expw, last_sign;
    bit r;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    last_sign = -1;         // first 1 is sent as +1
    for (int n = 0; n < 200; n++) begin
      bit b;
      b = 1'($urandom);
      send(b, 0, SYM_ZERO, w, r);
      if (!b) expw = 4;
      else begin
        last_sign = -last_sign;
        expw = (last_sign > 0) ? 6 : 2;
      end
      chk(r == 1, "rising edge at every bit");
      chk(w == expw, $sformatf("width %0d expected %0d (bit %0d)", w, expw, n));
    end
    // marker (+)(+)(-)(-) forced, then the next 1 must be +1
    send(1, 1, SYM_POS, w, r); chk(w == 6, "marker +");
    send(1, 1, SYM_POS, w, r); chk(w == 6, "marker + again");
    send(1, 1, SYM_NEG, w, r); chk(w == 2, "marker -");
    send(1, 1, SYM_NEG, w, r); chk(w == 2, "marker - again");
    send(0, 0, SYM_ZERO, w, r); chk(w == 4, "zero after marker");
    send(1, 0, SYM_ZERO, w, r); chk(w == 6 && sym_sent == SYM_POS, "+1 after marker");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
