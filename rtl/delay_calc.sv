// delay_calc: fiber-delay calculator of one fanout channel.
//
// The channel's 1PPS packet ends (ch_sec) and the synchronized unit at the other end sends
// its return 1PPS packet at its own second boundary; ret_edge marks when that return packet
// ends here. The elapsed time is the round trip, and half of it is the one-way delay
// (both fibers assumed equal, as in the document). On a new connection (after loss of
// signal or reset) the first measurement is written to the advance register adv at once.
// Afterwards each measurement is compared with adv: only when |half - adv| exceeds TOL
// cycles on REPEAT measurements in a row is adv replaced; a single outlier changes nothing.
// The transmitter sends this channel's 1PPS packet adv cycles early.
//
// Timing: cnt is 0 on the ch_sec cycle; a measurement is taken on the ret_edge cycle and
// adv changes one cycle later. A return edge with no send since reset is ignored, and so
// is one arriving half a second or more after the send: it belongs to a far end that is
// not yet aligned with this channel (a round trip that long is not a fiber delay).
module delay_calc #(
  parameter int SEC_LOG2 = 26,
  parameter int TOL      = 67,    // 1 us in 2^26 Hz cycles
  parameter int REPEAT   = 4      // consecutive deviating measurements before re-adjusting
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ch_sec,     // own 1PPS packet ended
  input  logic                ret_edge,   // return 1PPS packet ended
  input  logic                los,        // link lost: the next measurement is a new connection
  output logic [SEC_LOG2-1:0] adv,        // 1PPS advance (one-way delay)
  output logic [SEC_LOG2-1:0] rtt,        // last round trip measured
  output logic                meas_valid, // one cycle per measurement
  output logic                adjusted    // one cycle when adv was (re)written
);
  logic [SEC_LOG2-1:0] cnt;
  logic                started, fresh;
  logic [$clog2(REPEAT+1)-1:0] miss;
  logic [SEC_LOG2-1:0] half, diff;

  assign half = cnt >> 1;
  assign diff = (half > adv) ? half - adv : adv - half;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; started <= 1'b0; fresh <= 1'b1; miss <= '0;
      adv <= '0; rtt <= '0; meas_valid <= 1'b0; adjusted <= 1'b0;
    end else begin
      meas_valid <= 1'b0;
      adjusted   <= 1'b0;
      if (ch_sec) begin
        cnt     <= SEC_LOG2'(1);
        started <= 1'b1;
      end else if (cnt != '1) begin
        cnt <= cnt + 1'b1;
      end
      if (los) begin
        fresh <= 1'b1;
        miss  <= '0;
      end else if (ret_edge && started && !cnt[SEC_LOG2-1]) begin
        rtt        <= cnt;
        meas_valid <= 1'b1;
        if (fresh) begin
          adv <= half; fresh <= 1'b0; miss <= '0; adjusted <= 1'b1;
        end else if (diff > SEC_LOG2'(TOL)) begin
          if (miss == $bits(miss)'(REPEAT - 1)) begin
            adv <= half; miss <= '0; adjusted <= 1'b1;
          end else begin
            miss <= miss + 1'b1;
          end
        end else begin
          miss <= '0;
        end
      end
    end
  end
endmodule
