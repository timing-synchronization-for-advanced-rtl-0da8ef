// data_manager: gathers the packets received on all fanout channels into the FIFO.
//
// Each channel delivers at most one packet per 1024-cycle slot; the packet is held in the
// channel's one-entry memory buffer until a round-robin arbiter moves it to the FIFO (one
// per cycle), so N channels are drained within N cycles. While the FIFO is full the
// buffers hold their packets; a packet arriving at a buffer that is still occupied is
// dropped and counted (drops). The
// document gives the block's role only; buffer depth and arbitration are this design's.
module data_manager #(
  parameter int N = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0]        in_valid,
  input  logic [N-1:0][127:0] in_pkt,
  input  logic                fifo_full,
  output logic                push,
  output logic [127:0]        push_data,
  output logic [15:0]         drops
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;
  logic [N-1:0]        held;
  logic [N-1:0][127:0] buf_q;
  logic [IW-1:0]       rr;        // channel with the highest priority
  logic [IW-1:0]       sel;
  logic                found;

  always_comb begin
    found = 1'b0;
    sel   = '0;
    for (int k = 0; k < N; k++) begin
      if (!found && held[(int'(rr) + k) % N]) begin
        found = 1'b1;
        sel   = IW'((int'(rr) + k) % N);
      end
    end
  end

  assign push      = found && !fifo_full;
  assign push_data = buf_q[sel];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held <= '0; rr <= '0; drops <= '0;
    end else begin
      for (int c = 0; c < N; c++) begin
        if (push && sel == IW'(c)) held[c] <= 1'b0;
        if (in_valid[c]) begin
          if (held[c] && !(push && sel == IW'(c))) begin
            if (drops != 16'hFFFF) drops <= drops + 1'b1;
          end else begin
            held[c] <= 1'b1;
          end
        end
      end
      if (push) rr <= (sel == IW'(N-1)) ? '0 : sel + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    for (int c = 0; c < N; c++)
      if (in_valid[c] && (!held[c] || (push && sel == IW'(c)))) buf_q[c] <= in_pkt[c];
  end
endmodule
