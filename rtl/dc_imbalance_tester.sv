// dc_imbalance_tester: measures how well a fiber link tolerates an unbalanced line code.
//
// The normal line code alternates the sign of asymmetric pulses so that the AC-coupled
// optical drivers see no DC shift. This circuit deliberately breaks that rule: on start it
// sends NBITS symbols in which every 1 is a long (+1, 6 of 8 cycles high) pulse and every 0
// a symmetric one, never a short pulse, with the bits taken from a 16-bit LFSR
// (x^16+x^14+x^13+x^11+1, seed ACE1). The line goes out through one fanout transmitter and
// comes back, through a fiber, on another fanout receiver of the same board. The returned
// symbols are decoded, compared with a second copy of the LFSR, and stored in a bit buffer.
// Any difference, or a symbol that never arrives within RX_WAIT cycles after the last one
// was sent, sets err (the error LED) and counts in err_cnt. Once the run is over the buffer is
// sent as NBITS/8 bytes, first bit in the MSB of the first byte, through a serial
// transmitter (the RS422 monitor port), and done rises.
//
// Interface: start (one cycle) begins a run and clears err/done; tx_line/rx_line go to
// the optical transmitter/receiver; busy is high from start until done.
// Timing: one symbol every 8 cycles, so sending takes 8*NBITS cycles; the dump takes
// NBITS/8 * 10 * DIV cycles.
// From the source: the unalternated long pulses, the loop through a fiber to another
// fanout of the same board, the comparison with an error LED, the buffer dumped to the
// RS422 port, and the 1024-bit length. The LFSR pattern (the source does not say which
// bits were sent), the time-out and the byte order are this design's choices.
module dc_imbalance_tester
  import timing_pkg::*;
#(
  parameter int NBITS   = 1024,   // string length
  parameter int DIV     = 6991,   // serial clock divider: 2^26 / 9600
  parameter int RX_WAIT = 4096    // cycles allowed for the return after the last symbol
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        tx_line,
  input  logic        rx_line,
  output logic        txd,        // serial monitor output
  output logic        busy,
  output logic        done,
  output logic        err,        // error LED
  output logic [15:0] err_cnt
);
  localparam int CW = $clog2(NBITS + 1);
  localparam int NBYTES = NBITS / 8;
  localparam logic [15:0] SEED = 16'hACE1;

  typedef enum logic [1:0] {IDLE, RUN, DUMP} state_t;
  state_t state;

  function automatic logic [15:0] lfsr_next(input logic [15:0] v);
    return {v[14:0], v[15] ^ v[13] ^ v[12] ^ v[10]};
  endfunction

  // ---------------- transmit side
  logic [15:0]   tx_lfsr;
  logic [2:0]    ph;
  logic [CW-1:0] tx_cnt;
  logic          enc_start;
  sym_t          enc_sym, sym_sent;

  assign enc_start = (state == RUN) && (ph == 3'd0) && (tx_cnt != CW'(NBITS));
  assign enc_sym   = tx_lfsr[15] ? SYM_POS : SYM_ZERO;

  pwm_encoder u_enc (
    .clk, .rst_n, .start(enc_start), .bit_val(1'b0), .force_en(1'b1),
    .force_sym(enc_sym), .line(tx_line), .sym_sent
  );

  // ---------------- receive side
  logic          rise, sym_valid, los;
  sym_t          sym;
  logic [15:0]   rx_lfsr;
  logic [CW-1:0] rx_cnt;
  logic [$clog2(RX_WAIT+1)-1:0] wait_cnt;
  logic [7:0]    buf_mem [NBYTES];
  logic [7:0]    shreg;
  sym_t          exp_sym;

  assign exp_sym = rx_lfsr[15] ? SYM_POS : SYM_ZERO;

  pwm_decoder u_dec (.clk, .rst_n, .line(rx_line), .rise, .sym_valid, .sym, .los);

  // ---------------- serial dump
  logic [$clog2(NBYTES+1)-1:0] byte_idx;
  logic       ut_start, ut_ready, ut_start_d;

  assign ut_start = (state == DUMP) && ut_ready && !ut_start_d && (byte_idx != NBYTES[$bits(byte_idx)-1:0]);

  uart_tx #(.DIV(DIV)) u_tx (
    .clk, .rst_n, .start(ut_start), .data(buf_mem[byte_idx[$clog2(NBYTES)-1:0]]),
    .ready(ut_ready), .txd
  );

  assign busy = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; ph <= '0; tx_cnt <= '0; rx_cnt <= '0; wait_cnt <= '0;
      tx_lfsr <= SEED; rx_lfsr <= SEED; shreg <= '0;
      err <= 1'b0; err_cnt <= '0; done <= 1'b0; byte_idx <= '0; ut_start_d <= 1'b0;
    end else begin
      ut_start_d <= ut_start;
      case (state)
        IDLE: begin
          if (start) begin
            state <= RUN; ph <= '0; tx_cnt <= '0; rx_cnt <= '0; wait_cnt <= '0;
            tx_lfsr <= SEED; rx_lfsr <= SEED;
            err <= 1'b0; err_cnt <= '0; done <= 1'b0; byte_idx <= '0;
          end
        end
        RUN: begin
          ph <= ph + 3'd1;
          if (enc_start) begin
            tx_cnt  <= tx_cnt + 1'b1;
            tx_lfsr <= lfsr_next(tx_lfsr);
          end
          if (sym_valid && rx_cnt != CW'(NBITS)) begin
            rx_cnt  <= rx_cnt + 1'b1;
            rx_lfsr <= lfsr_next(rx_lfsr);
            shreg   <= {shreg[6:0], sym != SYM_ZERO};
            if (rx_cnt[2:0] == 3'd7)
              buf_mem[rx_cnt[CW-2:3]] <= {shreg[6:0], sym != SYM_ZERO};
            if (sym != exp_sym) begin
              err     <= 1'b1;
              err_cnt <= err_cnt + 1'b1;
            end
          end
          if (tx_cnt == CW'(NBITS)) begin
            if (rx_cnt == CW'(NBITS) || (sym_valid && rx_cnt == CW'(NBITS - 1))) begin
              state <= DUMP;
            end else if (wait_cnt == RX_WAIT[$bits(wait_cnt)-1:0]) begin
              err     <= 1'b1;                          // symbols lost on the way
              err_cnt <= err_cnt + 16'(NBITS - rx_cnt);
              state   <= DUMP;
            end else begin
              wait_cnt <= wait_cnt + 1'b1;
            end
          end
        end
        DUMP: begin
          if (ut_start) byte_idx <= byte_idx + 1'b1;
          if (byte_idx == NBYTES[$bits(byte_idx)-1:0] && ut_ready && !ut_start_d) begin
            state <= IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
