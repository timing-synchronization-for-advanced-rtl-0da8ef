// sync_verifier: keeps the local second aligned to the reference 1PPS edge.
//
// ref_edge is the start of the second as received (the first edge after a 1PPS packet from
// the uplink, or the external 1PPS on the master). If re-synchronization is allowed the
// local counter is loaded (load) so that this cycle becomes count 0. Otherwise the edge is
// checked against the local second (sec_pulse): a match clears the error count, a mismatch
// counts a sync error; when more than MAX_ERR consecutive errors have occurred the unit
// re-synchronizes on that edge. Re-synchronization is allowed after reset (boot-up) and
// after loss of the uplink, as the document lists; the error limit is above 1 so that a
// single corrupted edge does not move the clock.
//
// locked is high while synchronized and the last reference edge matched (no error
// pending); a unit returning 1PPS packets upstream reports it so that the fiber-delay
// calculator above only measures against a second it knows to be aligned.
//
// Timing: load is combinational with ref_edge, so the timebase reads 1 on the next cycle.
module sync_verifier #(
  parameter int MAX_ERR = 2       // consecutive sync errors tolerated
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ref_edge,     // start of the second from the reference
  input  logic sec_pulse,    // local count is 0
  input  logic los,          // reference lost
  output logic load,         // re-synchronize the timebase now
  output logic synced,       // aligned to the reference at least once since the last loss
  output logic sync_err,     // one cycle per mismatching edge
  output logic locked,       // synchronized and the last edge matched
  output logic [7:0] resyncs // number of re-synchronizations (saturating)
);
  logic allow;
  logic [$clog2(MAX_ERR+2)-1:0] errs;
  logic exceed;

  assign exceed   = ref_edge && !allow && !sec_pulse && (errs == $bits(errs)'(MAX_ERR));
  assign load     = ref_edge && (allow || exceed);
  assign sync_err = ref_edge && !allow && !sec_pulse;
  assign locked   = synced && (errs == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      allow <= 1'b1; synced <= 1'b0; errs <= '0; resyncs <= '0;
    end else if (los) begin
      allow <= 1'b1; synced <= 1'b0; errs <= '0;
    end else if (ref_edge) begin
      if (load) begin
        allow  <= 1'b0;
        synced <= 1'b1;
        errs   <= '0;
        if (resyncs != 8'hFF) resyncs <= resyncs + 1'b1;
      end else if (sec_pulse) begin
        errs <= '0;
      end else begin
        errs <= errs + 1'b1;
      end
    end
  end
endmodule
