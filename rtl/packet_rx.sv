// packet_rx: packet deframer for one fiber link.
//
// Bits (any non-zero symbol is a 1) are shifted into a 128-bit register. The receiver has
// no framing until it sees the 1PPS marker: the marker is bits 31..28 of the 1PPS packet,
// so at that moment 100 bits of the packet are already in the register and 28 remain.
// From then on every 128 received bits close a time slot. When the 1PPS slot closes the
// packet is reported (pps_valid, with its CRC verdict pps_crc_ok) and the next rising edge
// on the line - the first bit of the following slot - is reported as pps_edge: the start
// of the new second as seen at this receiver. Any other slot holding a non-zero word is a
// data packet: it is reported on pkt_valid if its CRC checks, otherwise on crc_err.
// An all-zero slot is idle (a valid packet always has a non-zero address offset or CRC).
// Loss of signal drops the framing until the next marker.
module packet_rx
  import timing_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         rise,        // from pwm_decoder
  input  logic         sym_valid,
  input  sym_t         sym,
  input  logic         marker,      // from pps_detector
  input  logic         los,
  output logic         aligned,     // slot framing known
  output logic [127:0] pkt,         // last completed slot
  output logic         pkt_valid,   // data packet with good CRC
  output logic         crc_err,     // data packet with bad CRC
  output logic         pps_valid,   // 1PPS packet complete
  output logic         pps_crc_ok,
  output logic         pps_edge     // start of the second (first rising edge after the 1PPS packet)
);
  logic [127:0] sr;
  logic [6:0]   bcnt;      // bits of the current slot received
  logic         in_pps;    // the current slot is the 1PPS slot
  logic         await_edge;
  logic [127:0] sr_next;

  assign sr_next = {sr[126:0], sym != SYM_ZERO};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr <= '0; bcnt <= '0; in_pps <= 1'b0; aligned <= 1'b0; await_edge <= 1'b0;
      pkt <= '0; pkt_valid <= 1'b0; crc_err <= 1'b0; pps_valid <= 1'b0;
      pps_crc_ok <= 1'b0; pps_edge <= 1'b0;
    end else begin
      pkt_valid <= 1'b0; crc_err <= 1'b0; pps_valid <= 1'b0; pps_edge <= 1'b0;
      if (rise && await_edge) begin
        pps_edge   <= 1'b1;
        await_edge <= 1'b0;
      end
      if (los) begin
        aligned <= 1'b0; in_pps <= 1'b0; await_edge <= 1'b0;
      end else if (sym_valid) begin
        sr <= sr_next;
        if (marker) begin
          aligned <= 1'b1;
          in_pps  <= 1'b1;
          bcnt    <= 7'd100;           // bits 127..28 are in
        end else if (aligned) begin
          bcnt <= bcnt + 1'b1;         // wraps 127 -> 0 at the end of a slot
          if (bcnt == 7'd127) begin
            pkt <= sr_next;
            if (in_pps) begin
              pps_valid  <= 1'b1;
              pps_crc_ok <= crc_ok(sr_next);
              await_edge <= 1'b1;
              in_pps     <= 1'b0;
            end else if (sr_next != '0) begin
              if (crc_ok(sr_next)) pkt_valid <= 1'b1;
              else                 crc_err   <= 1'b1;
            end
          end
        end
      end
    end
  end
endmodule
