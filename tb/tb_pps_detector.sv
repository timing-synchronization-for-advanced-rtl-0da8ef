// tb_pps_detector: the marker must be found exactly where it is and nowhere in data.
module tb_pps_detector;
  import timing_pkg::*;
  logic clk = 0, rst_n = 0, sym_valid = 0, marker;
  sym_t sym = SYM_ZERO;
  int checks = 0, failures = 0;

  pps_detector dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(input sym_t s, input bit expect_marker);
    @(negedge clk);
    sym_valid = 1; sym = s;
    #1 chk(marker == expect_marker, $sformatf("marker=%0d expected %0d", marker, expect_marker));
    @(negedge clk);
    sym_valid = 0;
    #1 chk(marker == 0, "marker only with sym_valid");
  endtask

  initial begin
    bit pos = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int m = 0; m < 20; m++) begin
      // alternating-sign data
      for (int i = 0; i < 40; i++) begin
        if ($urandom_range(0, 1)) begin pos = !pos; put(pos ? SYM_POS : SYM_NEG, 0); end
        else put(SYM_ZERO, 0);
      end
      put(SYM_POS, 0); put(SYM_POS, 0); put(SYM_NEG, 0); put(SYM_NEG, 1);
      pos = 0;
    end
    // near misses
    put(SYM_POS, 0); put(SYM_POS, 0); put(SYM_NEG, 0); put(SYM_ZERO, 0);
    put(SYM_POS, 0); put(SYM_NEG, 0); put(SYM_NEG, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
