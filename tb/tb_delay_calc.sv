// tb_delay_calc: round-trip measurement, first-connection write, tolerance to outliers,
// re-adjustment after REPEAT deviating measurements, loss of signal, and rejection of a
// return edge more than half a second after the send.
module tb_delay_calc;
  localparam int L = 14;
  logic clk = 0, rst_n = 0, ch_sec = 0, ret_edge = 0, los = 0;
  logic [L-1:0] adv, rtt;
  logic meas_valid, adjusted;
  int checks = 0, failures = 0, adjusts = 0;

  delay_calc #(.SEC_LOG2(L), .TOL(67), .REPEAT(4)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && adjusted) adjusts++;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one second: own 1PPS end, then the return after rt cycles
  task automatic second(input int rt);
    @(negedge clk); ch_sec = 1;
    @(negedge clk); ch_sec = 0;
    repeat (rt - 1) @(negedge clk);
    ret_edge = 1;
    @(negedge clk); ret_edge = 0;
    repeat (200) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    // return edge before any send: ignored
    @(negedge clk); ret_edge = 1; @(negedge clk); ret_edge = 0;
    chk(adv == 0 && adjusts == 0, "no measurement without a send");
    second(300);
    chk(rtt == 300, $sformatf("rtt %0d", rtt));
    chk(adv == 150 && adjusts == 1, "new connection: adv = rtt/2");
    second(450);                       // far unit not yet re-synchronized: outliers
    second(450);
    chk(adv == 150 && adjusts == 1, "outliers do not move adv");
    second(300);                       // back in line: the deviation count restarts
    for (int i = 0; i < 3; i++) second(700);
    chk(adv == 150, "three deviations are not enough");
    second(700);
    chk(adv == 350 && adjusts == 2, "fourth deviation in a row re-adjusts");
    second(760);                       // within tolerance (380 vs 350)
    second(760); second(760); second(760); second(760);
    chk(adv == 350 && adjusts == 2, "small deviations tolerated");
    @(negedge clk); los = 1; @(negedge clk); los = 0;
    second(9000);                      // over half a second: not a round trip
    chk(adv == 350 && adjusts == 2 && rtt != 9000, "return edge half a second late ignored");
    second(90);
    chk(adv == 45 && adjusts == 3, "after loss of signal the first measurement is written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
