// tb_flow_ctrl: the TA truth table, TC from uplink packets and flow-control requests on
// almost-full / almost-empty edges.
module tb_flow_ctrl;
  logic clk = 0, rst_n = 0, addr_valid = 0, up_los = 0, up_pkt_valid = 0, up_pkt_fc = 0;
  logic fifo_af = 0, fifo_ae = 1, tc, ta, fc_req, fc_val;
  int checks = 0, failures = 0, reqs = 0;
  logic last_val;

  flow_ctrl dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && fc_req) begin reqs++; last_val = fc_val; end

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

  task automatic set_tc(input bit v);
    @(negedge clk); up_pkt_valid = 1; up_pkt_fc = v;
    @(negedge clk); up_pkt_valid = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    // table columns: address-invalid (= !addr_valid), TC -> TA
    for (int inv = 0; inv < 2; inv++)
      for (int t = 0; t < 2; t++) begin
        addr_valid = !inv;
        set_tc(t);
        #1 chk(tc == t, "tc follows bit 127");
        chk(ta == (inv == 0 && t == 0), $sformatf("TA for invalid=%0d TC=%0d", inv, t));
      end
    addr_valid = 1;
    set_tc(1);
    @(negedge clk); up_los = 1; @(negedge clk); up_los = 0;
    chk(tc == 0, "loss clears TC");
    // FIFO thresholds
    repeat (3) @(negedge clk);
    chk(reqs == 0, "no request while nothing changes");
    fifo_ae = 0; @(negedge clk);
    fifo_af = 1; repeat (3) @(negedge clk);
    chk(reqs == 1 && last_val == 1, "almost full: hold request");
    fifo_af = 0; repeat (3) @(negedge clk);
    chk(reqs == 1, "leaving almost-full sends nothing");
    fifo_ae = 1; repeat (3) @(negedge clk);
    chk(reqs == 2 && last_val == 0, "almost empty: resume request");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
