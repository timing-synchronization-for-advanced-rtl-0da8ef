// pwm_decoder: receiver for the pulse-width coded fiber signal.
//
// The line is sampled with the local 2^26 Hz clock (8 samples per bit) through a two-stage
// synchronizer. A rising edge starts a pulse and is reported on rise (the receiver's bit
// timing reference). At the falling edge the number of high samples is classified by its
// nearest nominal width: 1-2 -> -1, 3-5 -> 0, 6-7 -> +1 (nominal 2, 4, 6; the thresholds
// are this design's choice). The symbol is reported on sym_valid for one cycle. A pulse
// that stays high for 8 samples or more is not a symbol.
//
// los (loss of signal) rises when no rising edge has been seen for LOS_CYC cycles and
// falls at the next rising edge. Latency: rise is 3 cycles after the line edge.
module pwm_decoder
  import timing_pkg::*;
#(
  parameter int LOS_CYC = 64       // cycles without an edge that mean loss of signal
) (
  input  logic clk,
  input  logic rst_n,
  input  logic line,      // from the optical receiver (asynchronous)
  output logic rise,      // a bit period started
  output logic sym_valid,
  output sym_t sym,
  output logic los
);
  logic [2:0] sync;       // synchronizer and edge detect
  logic [3:0] hi_cnt;
  logic       in_pulse;
  logic [$clog2(LOS_CYC+1)-1:0] idle;

  wire s_now  = sync[1];
  wire s_prev = sync[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync      <= '0;
      hi_cnt    <= '0;
      in_pulse  <= 1'b0;
      rise      <= 1'b0;
      sym_valid <= 1'b0;
      sym       <= SYM_ZERO;
      idle      <= '0;
      los       <= 1'b1;
    end else begin
      sync      <= {sync[1:0], line};
      rise      <= 1'b0;
      sym_valid <= 1'b0;
      if (s_now && !s_prev) begin
        rise     <= 1'b1;
        in_pulse <= 1'b1;
        hi_cnt   <= 4'd1;
        idle     <= '0;
        los      <= 1'b0;
      end else begin
        if (idle == $bits(idle)'(LOS_CYC)) los <= 1'b1;
        else idle <= idle + 1'b1;
        if (in_pulse) begin
          if (s_now) begin
            if (hi_cnt == 4'd8) in_pulse <= 1'b0;   // too long: no symbol
            else hi_cnt <= hi_cnt + 1'b1;
          end else begin
            in_pulse  <= 1'b0;
            sym_valid <= 1'b1;
            if (hi_cnt <= 4'd2)      sym <= SYM_NEG;
            else if (hi_cnt <= 4'd5) sym <= SYM_ZERO;
            else                     sym <= SYM_POS;
          end
        end
      end
    end
  end
endmodule
