// uart_tx: serial transmitter for the RS422 port to the PC.
//
// Sends each byte offered with start (while ready is high) as a 0 start bit, 8 data bits
// least significant first and a 1 stop bit, DIV clock cycles per bit (9600 baud from the
// 2^26 Hz clock). ready is high when the transmitter is idle; the line idles at 1.
module uart_tx #(
  parameter int DIV = 6991          // clock cycles per bit: 2^26 / 9600
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] data,
  output logic       ready,
  output logic       txd
);
  logic [9:0] sh;                   // stop, data[7:0], start
  logic [3:0] nbit;
  logic [$clog2(DIV)-1:0] tick;
  logic busy;

  assign ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '1; nbit <= '0; tick <= '0; busy <= 1'b0; txd <= 1'b1;
    end else if (!busy) begin
      txd <= 1'b1;
      if (start) begin
        sh   <= {1'b1, data, 1'b0};
        busy <= 1'b1;
        nbit <= '0;
        tick <= '0;
        txd  <= 1'b0;
      end
    end else if (tick == $bits(tick)'(DIV - 1)) begin
      tick <= '0;
      if (nbit == 4'd9) begin
        busy <= 1'b0;
        txd  <= 1'b1;
      end else begin
        nbit <= nbit + 1'b1;
        txd  <= sh[nbit + 4'd1];
      end
    end else begin
      tick <= tick + 1'b1;
    end
  end
endmodule
