// flow_ctrl: the transfer-allowed logic of one board.
//
// TC (transmission clearance, here 1 = the upstream board asked us to hold) follows the
// flow-control tag, bit 127, of every good data packet arriving from the uplink. TA, the
// flag that gates all upstream transmission, is the NOR of its components: TA = 1 only when
// the address is valid and TC is low (the document's truth table). When the board's own
// FIFO crosses its almost-full or almost-empty threshold, fc_req pulses once with fc_val =
// 1 (almost full: hold) or 0 (almost empty: resume) so that a flow-control packet is sent
// down every fanout channel. Loss of the uplink clears TC (the choice of this design; the
// address is invalid then anyway, so TA stays low).
module flow_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic addr_valid,    // ia from the address engine
  input  logic up_los,
  input  logic up_pkt_valid,  // good data packet from the uplink
  input  logic up_pkt_fc,     // its bit 127
  input  logic fifo_af,
  input  logic fifo_ae,
  output logic tc,
  output logic ta,
  output logic fc_req,
  output logic fc_val
);
  logic af_q, ae_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tc <= 1'b0; af_q <= 1'b0; ae_q <= 1'b1; fc_req <= 1'b0; fc_val <= 1'b0;
    end else begin
      if (up_los)            tc <= 1'b0;
      else if (up_pkt_valid) tc <= up_pkt_fc;
      af_q   <= fifo_af;
      ae_q   <= fifo_ae;
      fc_req <= 1'b0;
      if (fifo_af && !af_q)      begin fc_req <= 1'b1; fc_val <= 1'b1; end
      else if (fifo_ae && !ae_q) begin fc_req <= 1'b1; fc_val <= 1'b0; end
    end
  end

  assign ta = !(!addr_valid || tc);
endmodule
