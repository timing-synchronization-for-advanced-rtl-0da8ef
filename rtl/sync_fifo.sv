// sync_fifo: first-in first-out packet buffer with almost-full and almost-empty flags.
//
// A circular buffer of DEPTH words in a memory array, with read and write pointers and an
// occupancy count. af is high while more than 75% of the entries are used, ae while fewer
// than 25% are (the document's thresholds). A push to a full FIFO is refused and counted
// on overflow; the head word is always visible on rdata, and pop removes it.
// The document does not size the FIFO; DEPTH is this design's choice.
module sync_fifo #(
  parameter int WIDTH = 128,
  parameter int DEPTH = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic             full,
  output logic             af,
  output logic             ae,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic             overflow   // one cycle per refused push
);
  localparam int AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic do_push, do_pop;

  assign empty   = (count == 0);
  assign full    = (count == $bits(count)'(DEPTH));
  assign af      = (count * 4 > $bits(count)'(DEPTH) * 3);
  assign ae      = (count * 4 < $bits(count)'(DEPTH));
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rdata   = mem[rp];

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0; overflow <= 1'b0;
    end else begin
      overflow <= push && full;
      if (do_push) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      count <= count + $bits(count)'(do_push) - $bits(count)'(do_pop);
    end
  end
endmodule
