// utc_to_gps: converts a UTC calendar date and time to GPS seconds.
//
// GPS time is the count of seconds since 1980-01-06 00:00:00 as a 32-bit word. The year is
// recovered from its low byte (0xCE..0xFF -> 1998..2047, 0x00..0x1F -> 2048..2079). Days
// since the epoch = 365*(year-1980) + leap days before the year ((year-1977)/4, exact for
// 1980..2099) + days before the month (table) + 1 if the year is leap and month > 2 +
// day - 6. The result is days*86400 + h*3600 + m*60 + s + LEAP, where LEAP is the GPS-UTC
// leap-second offset (14 s from 2006 to 2008; the document does not give it). The
// conversion is registered: gps_sec and valid appear one cycle after in_valid.
module utc_to_gps #(
  parameter int LEAP = 14
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [7:0]  month,     // 1..12
  input  logic [7:0]  day,       // 1..31
  input  logic [7:0]  year_lo,   // low byte of the binary year
  input  logic [7:0]  hour,
  input  logic [7:0]  minute,
  input  logic [7:0]  second,
  output logic [31:0] gps_sec,
  output logic        valid
);
  logic [11:0] year;
  logic [8:0]  before_month;
  logic [31:0] days, secs;
  logic [6:0]  ny;

  always_comb begin
    year = (year_lo >= 8'hCE) ? 12'h700 + 12'(year_lo) : 12'h800 + 12'(year_lo);
    ny   = 7'(year - 12'd1980);
    unique case (month)
      8'd1:  before_month = 9'd0;
      8'd2:  before_month = 9'd31;
      8'd3:  before_month = 9'd59;
      8'd4:  before_month = 9'd90;
      8'd5:  before_month = 9'd120;
      8'd6:  before_month = 9'd151;
      8'd7:  before_month = 9'd181;
      8'd8:  before_month = 9'd212;
      8'd9:  before_month = 9'd243;
      8'd10: before_month = 9'd273;
      8'd11: before_month = 9'd304;
      default: before_month = 9'd334;
    endcase
    days = 32'(ny) * 32'd365 + 32'(8'(8'(ny) + 8'd3) >> 2) + 32'(before_month)
         + ((year[1:0] == 2'b00 && month > 8'd2) ? 32'd1 : 32'd0)
         + 32'(day) - 32'd6;
    secs = days * 32'd86400 + 32'(hour) * 32'd3600 + 32'(minute) * 32'd60
         + 32'(second) + 32'(LEAP);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gps_sec <= '0; valid <= 1'b0;
    end else begin
      valid <= in_valid;
      if (in_valid) gps_sec <= secs;
    end
  end
endmodule
