// tb_gps_ha_parser: messages embedded in other bytes, partial markers, back-to-back.
module tb_gps_ha_parser;
  logic clk = 0, rst_n = 0, rx_valid = 0, valid;
  logic [7:0] rx_data = 0, month, day, year_lo, hour, minute, second;
  int checks = 0, failures = 0, nvalid = 0;

  gps_ha_parser dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && valid) nvalid++;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(input logic [7:0] b);
    @(negedge clk); rx_valid = 1; rx_data = b;
    @(negedge clk); rx_valid = 0;
    repeat (2) @(negedge clk);
  endtask

  task automatic message(input logic [7:0] f[7]);
    put("@"); put("@"); put("H"); put("a");
    for (int i = 0; i < 7; i++) put(f[i]);
    // rest of the 154-byte message: no marker inside
    for (int i = 0; i < 143; i++) put(8'($urandom_range(0, 63)));
  endtask

  initial begin
    logic [7:0] f[7];
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    put("x"); put("@"); put("H"); put("@"); put("@"); put("H"); put("b");   // near misses
    chk(nvalid == 0, "no false marker");
    for (int m = 0; m < 5; m++) begin
      int n0;
      n0 = nvalid;
      for (int i = 0; i < 7; i++) f[i] = 8'($urandom);
      if (m == 2) put("@");           // "@@@Ha"
      message(f);
      chk(nvalid == n0 + 1, "one result per message");
      chk(month == f[0] && day == f[1] && year_lo == f[3] && hour == f[4] &&
          minute == f[5] && second == f[6], "fields: year high byte dropped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
