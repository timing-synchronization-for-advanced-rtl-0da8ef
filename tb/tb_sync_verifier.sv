// tb_sync_verifier: initial synchronization, tolerated errors, re-synchronization after
// more than MAX_ERR consecutive errors, the locked report, and loss of the reference.
module tb_sync_verifier;
  localparam int L = 10;
  logic clk = 0, rst_n = 0, ref_edge = 0, los = 0;
  logic load, synced, sync_err, locked;
  logic [7:0] resyncs;
  logic [L-1:0] cyc;
  logic sec_pulse, bs, ss;
  int checks = 0, failures = 0, errs = 0;

  sync_verifier #(.MAX_ERR(2)) dut (.clk, .rst_n, .ref_edge, .sec_pulse, .los, .load, .synced,
                                    .sync_err, .locked, .resyncs);
  timebase #(.SEC_LOG2(L)) u_tb (.clk, .rst_n, .load, .cyc, .sec_pulse, .bit_start(bs),
                                 .slot_start(ss));
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && sync_err) errs++;

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

  // reference edge after gap cycles; report the local count seen with it
  task automatic edge_after(input int gap, output int seen);
    repeat (gap - 1) @(negedge clk);
    ref_edge = 1;
    seen = int'(cyc);
    @(negedge clk); ref_edge = 0;
  endtask

  initial begin
    int seen;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    edge_after(333, seen);
    chk(synced && resyncs == 1 && errs == 0, "first edge synchronizes");
    chk(cyc == 1 && locked, "counter restarted, locked");
    for (int i = 0; i < 3; i++) begin
      edge_after(1 << L, seen);
      chk(seen == 0 && resyncs == 1 && errs == 0, "edges on the second: no error");
    end
    // the reference moves by 40 cycles
    edge_after((1 << L) - 40, seen);
    chk(errs == 1 && resyncs == 1 && !locked && synced, "1st error tolerated, not locked");
    edge_after(1 << L, seen);
    chk(errs == 2 && resyncs == 1, "2nd error tolerated");
    edge_after(1 << L, seen);
    chk(errs == 3 && resyncs == 2 && cyc == 1 && locked, "3rd consecutive error re-synchronizes");
    edge_after(1 << L, seen);
    chk(seen == 0 && errs == 3, "aligned to the new reference");
    // an isolated error, then good edges: count restarts
    edge_after((1 << L) - 5, seen);
    edge_after(5, seen);
    edge_after(1 << L, seen);
    chk(resyncs == 2, "isolated errors do not re-synchronize");
    @(negedge clk); los = 1; @(negedge clk); los = 0;
    chk(!synced && !locked, "loss clears synced");
    edge_after(77, seen);
    chk(synced && resyncs == 3, "first edge after loss re-synchronizes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
