// fanout_channel: one of the downstream fiber ports of a Master-Fanout or Fanout board.
//
// Transmit side: every second, while the board itself is synchronized (pps_en), the port
// sends the 1PPS packet built for it (its own address string and the GPS second about to
// begin) in the last time slot, advanced by the fiber
// delay measured on this port, so that the unit at the far end sees the second start when
// it starts here. In the other slots it sends, in this order of priority, a pending
// flow-control packet (requested on fc_req for all ports at once) or the routed data packet
// held in its one-entry memory buffer (down_valid loads it; down_full shows it occupied;
// down_drop reports a packet that found it full).
// Receive side: the fiber is decoded; good data packets from the unit below are passed on
// up_valid/up_pkt, and the end of that unit's return 1PPS packet feeds the fiber-delay
// calculator together with the moment this port's own 1PPS packet ended - but only when
// the return packet passed its CRC and reports the unit below as locked (its last 1PPS
// edge matched its second), so a unit still carrying an old alignment is not measured;
// meas_en lets the board pause measurements just after its own second has moved.
module fanout_channel
  import timing_pkg::*;
#(
  parameter int SEC_LOG2     = 26,
  parameter int LOS_CYC      = 64,
  parameter int DELAY_TOL    = 67,
  parameter int DELAY_REPEAT = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [SEC_LOG2-1:0] cyc,
  input  logic                pps_en,      // board synchronized: send 1PPS packets
  input  logic                meas_en,     // board alignment settled: measure the delay
  input  pps_pkt_t            pps_pkt,     // this port's 1PPS packet
  input  logic                fc_req,      // send a flow-control packet
  input  logic                fc_val,      // its tag: 1 = hold, 0 = resume
  input  addr_t               own,         // sender address for the flow-control packet
  input  logic                down_valid,  // routed packet for this port
  input  logic [127:0]        down_pkt,
  output logic                down_drop,
  output logic                down_full,   // buffer occupied: a new packet would be dropped
  input  logic                rx_line,     // from the optical receiver
  output logic                tx_line,     // to the optical transmitter
  output logic                up_valid,    // good data packet from below
  output logic [127:0]        up_pkt,
  output logic                crc_err,
  output logic                link_up,
  output logic [SEC_LOG2-1:0] adv,
  output logic [SEC_LOG2-1:0] rtt,
  output logic                meas_valid,
  output logic                adjusted
);
  // ---- memory buffer and flow-control packet
  logic         held, fc_pend, fc_tag, data_ack, ch_sec;
  logic [127:0] held_pkt, fc_pkt, tx_data;
  data_pkt_t    f;

  always_comb begin
    f         = '0;
    f.a       = '{fc: fc_tag, offset: own.offset, addr: own.addr};
    f.id      = FC_PKT_ID;
    fc_pkt    = f;
    tx_data   = fc_pend ? fc_pkt : held_pkt;
  end
  assign down_full = held;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held <= 1'b0; fc_pend <= 1'b0; fc_tag <= 1'b0; held_pkt <= '0; down_drop <= 1'b0;
    end else begin
      down_drop <= 1'b0;
      if (fc_req) begin
        fc_pend <= 1'b1;
        fc_tag  <= fc_val;
      end else if (data_ack && fc_pend) begin
        fc_pend <= 1'b0;
      end
      if (data_ack && !fc_pend) held <= 1'b0;
      if (down_valid) begin
        if (held && !(data_ack && !fc_pend)) down_drop <= 1'b1;
        else begin
          held     <= 1'b1;
          held_pkt <= down_pkt;
        end
      end
    end
  end

  packet_tx #(.SEC_LOG2(SEC_LOG2)) u_tx (
    .clk, .rst_n, .cyc, .adv,
    .pps_en,
    .pps_pkt    (pps_pkt),
    .data_valid (fc_pend || held),
    .data_pkt   (tx_data),
    .data_ack,
    .ch_sec,
    .line       (tx_line)
  );

  // ---- receive path
  logic rise, sym_valid, los, marker, aligned, pps_valid, pps_crc_ok, pps_edge, ret_edge;
  sym_t sym;
  pps_pkt_t ret_pps;

  pwm_decoder #(.LOS_CYC(LOS_CYC)) u_dec (
    .clk, .rst_n, .line(rx_line), .rise, .sym_valid, .sym, .los
  );
  pps_detector u_det (.clk, .rst_n, .sym_valid, .sym, .marker);
  packet_rx u_rx (
    .clk, .rst_n, .rise, .sym_valid, .sym, .marker, .los, .aligned,
    .pkt(up_pkt), .pkt_valid(up_valid), .crc_err, .pps_valid, .pps_crc_ok, .pps_edge
  );

  // the received packet stays in up_pkt until the next slot ends, past the edge
  assign ret_pps  = pps_pkt_t'(up_pkt);
  assign ret_edge = pps_edge && pps_crc_ok && ret_pps.locked && meas_en;

  delay_calc #(.SEC_LOG2(SEC_LOG2), .TOL(DELAY_TOL), .REPEAT(DELAY_REPEAT)) u_dly (
    .clk, .rst_n, .ch_sec, .ret_edge, .los, .adv, .rtt, .meas_valid, .adjusted
  );

  assign link_up = !los;
endmodule
