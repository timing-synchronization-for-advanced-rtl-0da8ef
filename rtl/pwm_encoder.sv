// pwm_encoder: pulse-width line encoder for the 2^23 Hz fiber signal.
//
// Every bit period (8 oscillator cycles) starts with a rising edge, so the line always
// carries a clean periodic edge for the receiver's phase lock. The falling edge carries
// the data: a 0 is a 4-of-8 pulse (50% duty), a 1 is an asymmetric pulse, 6-of-8 (+1) or
// 2-of-8 (-1). To keep the AC-coupled fiber DC balanced, successive 1s alternate in sign
// whatever number of 0s lies between them (the document's rule). The only exception is the
// 1PPS marker: with force_en the caller dictates the symbol, and the marker (+)(+)(-)(-)
// is the one place two equal signs follow each other. A forced symbol also updates the sign
// memory, so after the marker the next 1 is sent as +1.
//
// Interface: on start (one cycle, once per 8 cycles) the symbol for the next bit is taken
// from bit_val or force_sym. line rises on the cycle after start and stays high 2, 4 or 6
// cycles. The starting sign after reset (first 1 sent as +1) is this design's choice.
module pwm_encoder
  import timing_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,       // begin a bit period
  input  logic bit_val,     // data bit (1 = asymmetric pulse)
  input  logic force_en,    // send force_sym instead (1PPS marker)
  input  sym_t force_sym,
  output logic line,        // to the optical transmitter
  output sym_t sym_sent     // symbol chosen at the last start
);
  logic       last_pos;     // sign of the last asymmetric pulse (1 = +1)
  logic [2:0] remain;       // high cycles still to send
  sym_t       sym;

  always_comb begin
    if (force_en)     sym = force_sym;
    else if (bit_val) sym = last_pos ? SYM_NEG : SYM_POS;
    else              sym = SYM_ZERO;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_pos <= 1'b0;
      remain   <= '0;
      line     <= 1'b0;
      sym_sent <= SYM_ZERO;
    end else if (start) begin
      line     <= 1'b1;
      sym_sent <= sym;
      unique case (sym)
        SYM_POS: begin remain <= 3'd5; last_pos <= 1'b1; end
        SYM_NEG: begin remain <= 3'd1; last_pos <= 1'b0; end
        default:       remain <= 3'd3;
      endcase
    end else if (remain != 0) begin
      remain <= remain - 1'b1;
    end else begin
      line <= 1'b0;
    end
  end
endmodule
