// timebase: the local time of a node, counted in cycles of the 2^26 Hz oscillator.
//
// A free-running counter counts 0 .. 2^SEC_LOG2-1 and wraps once per second; since the
// oscillator is phase-locked to the network reference, one wrap is exactly one second and
// the count is the sub-second time stamp (resolution 2^-26 s, about 15 ns). From it come
// the strobes the rest of the board runs on: the bit phase of the 8 MHz line clock
// (cyc[2:0]), the 1024-cycle time slot (cyc[9:3] is the bit within the slot) and a
// one-cycle 1PPS pulse at count 0. This replaces the separate derived clocks of the
// original board by clock enables in one clock domain (a choice of this design).
//
// load: re-synchronization. The cycle on which load is high is taken as count 0 of a new
// second, so the counter reads 1 on the next cycle. Timing: all outputs are registered
// or decoded from the registered count.
module timebase #(
  parameter int SEC_LOG2 = 26      // log2 of oscillator cycles per second (2^26 Hz VCO)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,       // this cycle is the start of the second
  output logic [SEC_LOG2-1:0] cyc,        // cycle within the second
  output logic                sec_pulse,  // 1 when cyc == 0
  output logic                bit_start,  // 1 when a line bit period starts (cyc[2:0]==0)
  output logic                slot_start  // 1 when a time slot starts
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    cyc <= '0;
    else if (load) cyc <= SEC_LOG2'(1);
    else           cyc <= cyc + 1'b1;
  end

  assign sec_pulse  = (cyc == '0);
  assign bit_start  = (cyc[2:0] == 3'd0);
  assign slot_start = (cyc[9:0] == 10'd0);
endmodule
