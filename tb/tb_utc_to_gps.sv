// tb_utc_to_gps: dates across leap years and the range ends, against values computed
// offline from the calendar (seconds since 1980-01-06 plus 14 leap seconds).
module tb_utc_to_gps;
  logic clk = 0, rst_n = 0, in_valid = 0, valid;
  logic [7:0] month = 1, day = 1, year_lo = 0, hour = 0, minute = 0, second = 0;
  logic [31:0] gps_sec;
  int checks = 0, failures = 0;

  utc_to_gps #(.LEAP(14)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic conv(input int y, input int mo, input int d, input int h, input int mi,
                      input int s, input longint exp);
    @(negedge clk);
    in_valid = 1; year_lo = 8'(y); month = 8'(mo); day = 8'(d); hour = 8'(h);
    minute = 8'(mi); second = 8'(s);
    @(negedge clk); in_valid = 0;
    chk(valid, "valid one cycle after the input");
    chk(gps_sec == 32'(exp), $sformatf("%0d-%0d-%0d %0d:%0d:%0d -> %0d, expected %0d",
        y, mo, d, h, mi, s, gps_sec, exp));
    @(negedge clk);
    chk(!valid, "valid is a pulse");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    conv(2007, 8, 31, 12, 34, 56, 872598910);
    conv(2000, 2, 29, 23, 59, 59, 635904013);
    conv(2000, 3, 1, 0, 0, 0, 635904014);
    conv(1999, 12, 31, 23, 59, 59, 630720013);
    conv(2008, 12, 31, 1, 2, 3, 914720537);
    conv(2050, 7, 4, 5, 6, 7, 2224559181);
    conv(2079, 12, 31, 23, 59, 59, 3155328013);
    conv(1998, 1, 1, 0, 0, 0, 567648014);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
