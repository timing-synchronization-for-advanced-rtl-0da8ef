// uart_rx: serial receiver for the RS422 ports (GPS receiver link).
//
// Frame: a 0 start bit, 8 data bits least significant first, a 1 stop bit, no parity, at
// 9600 baud (the document's format). The line passes a two-stage synchronizer; a falling
// edge starts a frame, and each bit is sampled in the middle of its period (DIV cycles of
// the 2^26 Hz clock per bit, 2^26/9600 rounded). A byte is delivered on valid for one
// cycle after the middle of the stop bit; a 0 stop bit is reported on frame_err instead.
module uart_rx #(
  parameter int DIV = 6991          // clock cycles per bit: 2^26 / 9600
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);
  typedef enum logic [1:0] {IDLE, START, DATA, STOP} st_t;
  st_t st;
  logic [1:0]  sync;
  logic [$clog2(DIV)-1:0] tick;
  logic [2:0]  nbit;
  logic [7:0]  sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; sync <= 2'b11; tick <= '0; nbit <= '0; sh <= '0;
      data <= '0; valid <= 1'b0; frame_err <= 1'b0;
    end else begin
      sync      <= {sync[0], rxd};
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (st)
        IDLE: if (!sync[1]) begin st <= START; tick <= '0; end
        START:
          if (tick == $bits(tick)'(DIV/2 - 1)) begin
            tick <= '0;
            st   <= sync[1] ? IDLE : DATA;      // a glitch is not a start bit
            nbit <= '0;
          end else tick <= tick + 1'b1;
        DATA:
          if (tick == $bits(tick)'(DIV - 1)) begin
            tick <= '0;
            sh   <= {sync[1], sh[7:1]};
            nbit <= nbit + 1'b1;
            if (nbit == 3'd7) st <= STOP;
          end else tick <= tick + 1'b1;
        STOP:
          if (tick == $bits(tick)'(DIV - 1)) begin
            st <= IDLE;
            if (sync[1]) begin data <= sh; valid <= 1'b1; end
            else frame_err <= 1'b1;
          end else tick <= tick + 1'b1;
      endcase
    end
  end
endmodule
