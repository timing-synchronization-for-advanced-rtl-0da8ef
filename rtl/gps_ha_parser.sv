// gps_ha_parser: picks the UTC date and time out of the GPS receiver's position message.
//
// The receiver sends, once per second, a message of binary bytes starting with the ASCII
// marker "@@Ha". The seven bytes that follow the marker are month, day, year (two bytes,
// high first), hours, minutes and seconds. The parser hunts for the marker byte by byte,
// then keeps six of the seven bytes: the high byte of the year is dropped, which loses
// nothing for the years the receiver reports (1998..2079: the low byte alone tells them
// apart, see utc_to_gps). valid pulses for one cycle when the seconds byte has arrived.
// The byte order follows the receiver's documented message layout, which the source
// design relies on without restating it.
module gps_ha_parser (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] rx_data,
  input  logic       rx_valid,
  output logic [7:0] month,
  output logic [7:0] day,
  output logic [7:0] year_lo,
  output logic [7:0] hour,
  output logic [7:0] minute,
  output logic [7:0] second,
  output logic       valid
);
  logic [3:0] pos;     // 0..3: marker bytes matched; 4..10: field bytes

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos <= '0; valid <= 1'b0;
      month <= '0; day <= '0; year_lo <= '0; hour <= '0; minute <= '0; second <= '0;
    end else begin
      valid <= 1'b0;
      if (rx_valid) begin
        unique case (pos)
          4'd0: pos <= (rx_data == "@") ? 4'd1 : 4'd0;
          4'd1: pos <= (rx_data == "@") ? 4'd2 : 4'd0;
          4'd2: pos <= (rx_data == "H") ? 4'd3 : (rx_data == "@") ? 4'd2 : 4'd0;
          4'd3: pos <= (rx_data == "a") ? 4'd4 : (rx_data == "@") ? 4'd1 : 4'd0;
          4'd4: begin month   <= rx_data; pos <= 4'd5; end
          4'd5: begin day     <= rx_data; pos <= 4'd6; end
          4'd6: pos <= 4'd7;                          // year, high byte: dropped
          4'd7: begin year_lo <= rx_data; pos <= 4'd8; end
          4'd8: begin hour    <= rx_data; pos <= 4'd9; end
          4'd9: begin minute  <= rx_data; pos <= 4'd10; end
          4'd10: begin second <= rx_data; pos <= 4'd0; valid <= 1'b1; end
          default: pos <= 4'd0;
        endcase
      end
    end
  end
endmodule
