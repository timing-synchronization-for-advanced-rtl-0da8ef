// pps_detector: finds the 1PPS marker in the decoded symbol stream.
//
// The marker is the 4-symbol sequence (+1)(+1)(-1)(-1), bits 31..28 of the 1PPS packet.
// It is the only place where two asymmetric pulses of equal sign are adjacent, which the
// encoder never produces for data, so a 4-symbol window compare finds it without framing.
// marker pulses for one cycle together with the sym_valid of the last (-1) symbol.
module pps_detector
  import timing_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic sym_valid,
  input  sym_t sym,
  output logic marker
);
  sym_t win [3];   // the three previous symbols, win[0] the most recent

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win[0] <= SYM_ZERO; win[1] <= SYM_ZERO; win[2] <= SYM_ZERO;
    end else if (sym_valid) begin
      win[0] <= sym; win[1] <= win[0]; win[2] <= win[1];
    end
  end

  assign marker = sym_valid && sym == SYM_NEG && win[0] == SYM_NEG &&
                  win[1] == SYM_POS && win[2] == SYM_POS;
endmodule
