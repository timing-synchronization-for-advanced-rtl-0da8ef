// packet_tx: transmitter for one fiber link, slot by slot.
//
// The link runs on its own channel time, the local time advanced by adv cycles (the
// measured one-way delay of the link); a receiver that far away then sees each slot and
// second boundary when its sender's local time reaches it. At the start of each 1024-cycle
// slot the transmitter loads the slot's content: the last slot of the second carries the
// 1PPS packet (pps_pkt, the marker inserted here) so that its end - the rising edge of the
// first bit of slot 0 - leaves adv cycles before the next local second. Other slots carry
// the data packet offered on data_valid/data_pkt (data_ack pulses when it is taken) or are
// idle (all zeros, CRC field included: 50% pulses that keep the edges for the receiver's
// PLL). Bits 127..16 go out MSB first through a serial CRC-16 register whose content is
// sent as bits 15..0.
//
// Timing: ch_sec is high on the cycle channel time is 0, the reference from which the
// fiber-delay calculator measures. Changing adv, or re-aligning the local time, shifts
// channel time at once. If the shift leaves the slot in progress, the rest of that slot is
// sent as idle (so a 1PPS packet can never go out twice or from the middle); a data packet
// already taken in that slot is lost. A shift within the slot tears the packet, and the
// receiver's CRC check discards it.
module packet_tx
  import timing_pkg::*;
#(
  parameter int SEC_LOG2 = 26
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [SEC_LOG2-1:0] cyc,        // local time
  input  logic [SEC_LOG2-1:0] adv,        // advance of this link
  input  logic                pps_en,     // send 1PPS packets on this link
  input  logic [127:0]        pps_pkt,    // 1PPS packet (marker and CRC filled in here)
  input  logic                data_valid,
  input  logic [127:0]        data_pkt,   // data packet (CRC filled in here)
  output logic                data_ack,
  output logic                ch_sec,     // channel time is 0 this cycle
  output logic                line
);
  logic [SEC_LOG2-1:0] t;
  logic [127:0] slot, next_slot, cur;
  logic         is_pps, next_pps, cur_pps, is_idle, next_idle, cur_idle;
  logic [6:0]   bidx;
  logic [SEC_LOG2-11:0] slot_no;
  logic         live;
  logic         bit_start, slot_start, last_slot, force_en, cur_bit;
  logic [15:0]  crc;
  sym_t         force_sym, sym_unused;

  assign t          = cyc + adv;
  assign bit_start  = (t[2:0] == 3'd0);
  assign slot_start = (t[9:0] == 10'd0);
  assign last_slot  = (t[SEC_LOG2-1:10] == '1);
  assign bidx       = t[9:3];
  assign ch_sec     = (t == '0);

  // Content of the slot about to start.
  assign next_pps  = last_slot && pps_en;
  assign next_slot = next_pps ? {pps_pkt[127:32], 4'hF, pps_pkt[27:0]}
                   : (!last_slot && data_valid) ? data_pkt : '0;
  assign data_ack  = slot_start && !last_slot && data_valid;
  assign next_idle = !next_pps && !(!last_slot && data_valid);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot    <= '0;
      slot_no <= '0;
      is_pps  <= 1'b0;
      is_idle <= 1'b1;
    end else if (slot_start) begin
      slot    <= next_slot;
      slot_no <= t[SEC_LOG2-1:10];
      is_pps  <= next_pps;
      is_idle <= next_idle;
    end
  end

  // At a slot start the new content is not yet registered; once channel time has left the
  // registered slot (a jump) the slot is idle until the next slot start.
  assign live     = (t[SEC_LOG2-1:10] == slot_no);
  assign cur      = slot_start ? next_slot : live ? slot : '0;
  assign cur_pps  = slot_start ? next_pps  : live && is_pps;
  assign cur_idle = slot_start ? next_idle : !live || is_idle;
  // an idle slot stays all zeros, CRC field included, so that the receiver can skip it
  assign cur_bit  = (bidx < 7'd112) ? cur[7'd127 - bidx]
                  : !cur_idle && crc[4'd15 - 4'(bidx - 7'd112)];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       crc <= 16'hFFFF;
    else if (bit_start && bidx == 0)  crc <= crc_step(16'hFFFF, cur_bit);
    else if (bit_start && bidx < 112) crc <= crc_step(crc, cur_bit);
  end

  // Marker bits 31..28 are bit indices 96..99 of the slot: (+)(+)(-)(-).
  assign force_en  = cur_pps && bidx >= 7'd96 && bidx <= 7'd99;
  assign force_sym = (bidx <= 7'd97) ? SYM_POS : SYM_NEG;

  pwm_encoder u_enc (
    .clk, .rst_n,
    .start    (bit_start),
    .bit_val  (cur_bit),
    .force_en,
    .force_sym,
    .line,
    .sym_sent (sym_unused)
  );
endmodule
