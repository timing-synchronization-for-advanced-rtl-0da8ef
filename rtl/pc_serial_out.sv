// pc_serial_out: streams buffered packets to the PC over the RS422 serial port.
//
// Whenever the FIFO holds a packet, the packet is taken (pop, one cycle) and sent as 16
// bytes, most significant byte first, through a 9600-baud transmitter (one packet every
// 160 bit times, about 16.7 ms). The document says only that stored packets can be read by
// a PC over the serial port; streaming them unprompted in this byte order is this design's
// choice.
module pc_serial_out #(
  parameter int DIV = 6991
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         fifo_empty,
  input  logic [127:0] fifo_data,
  output logic         fifo_pop,
  output logic         txd,
  output logic         busy
);
  logic [127:0] pkt;
  logic [4:0]   left;          // bytes still to send
  logic         tx_ready, tx_start;

  assign busy     = (left != 0);
  assign fifo_pop = !busy && !fifo_empty;
  assign tx_start = busy && tx_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pkt <= '0; left <= '0;
    end else if (fifo_pop) begin
      pkt  <= fifo_data;
      left <= 5'd16;
    end else if (tx_start) begin
      pkt  <= {pkt[119:0], 8'h00};
      left <= left - 1'b1;
    end
  end

  uart_tx #(.DIV(DIV)) u_tx (
    .clk, .rst_n, .start(tx_start), .data(pkt[127:120]), .ready(tx_ready), .txd
  );
endmodule
