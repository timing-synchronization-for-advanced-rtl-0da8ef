// tb_addr_engine: master address, address copied from 1PPS packets, per-port address
// strings (the offset table), invalid address handling and the routing decisions.
module tb_addr_engine;
  import timing_pkg::*;
  logic clk = 0, rst_n = 0, is_mfo = 0, up_los = 0, pps_valid = 0;
  addr_t pps_addr = '0, own, q = '0;
  logic ia, addr_err, r_absorb, r_forward, r_error;
  logic [3:0] r_port;
  addr_t [15:0] port_addr;
  int checks = 0, failures = 0;

  addr_engine #(.NP(16), .IS_SLAVE(1'b0)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic give(input logic [2:0] off, input logic [27:0] a);
    @(negedge clk);
    pps_addr = '{fc: 1'b0, offset: off, addr: a}; pps_valid = 1;
    @(negedge clk); pps_valid = 0;
  endtask

  // expected routing from an independent reading of the rules
  task automatic route(input logic [2:0] off, input logic [27:0] a, input int exp);
    // exp: -1 error, -2 absorb, >= 0 port
    @(negedge clk);
    q = '{fc: 1'b0, offset: off, addr: a};
    #1;
    if (exp == -1) chk(r_error && !r_absorb && !r_forward, $sformatf("error for %0d/%h", off, a));
    else if (exp == -2) chk(r_absorb && !r_forward && !r_error, $sformatf("absorb %0d/%h", off, a));
    else chk(r_forward && !r_absorb && !r_error && r_port == exp,
             $sformatf("forward %0d/%h to %0d (got %0d)", off, a, exp, r_port));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    @(negedge clk);
    chk(!ia && own == '0, "invalid after reset");
    chk(port_addr[3] == '0, "invalid board sends offset 000");
    is_mfo = 1;
    @(negedge clk); @(negedge clk);
    chk(ia && own.offset == 0, "master is valid at offset 0");
    for (int p = 0; p < 16; p++)
      chk(port_addr[p].offset == 1 && port_addr[p].addr == {4'(p), 24'h0}, "master port strings: bits 27..24");
    route(3'd1, 28'h5000000, 5);
    route(3'd3, 28'hA120000, 10);
    route(3'd0, 28'h0, -2);
    is_mfo = 0;
    // a fanout at level 2 reached through port 7 then port 9
    give(3'd2, 28'h7900000);
    @(negedge clk);
    chk(ia && own.offset == 2 && own.addr == 28'h7900000, "address copied");
    for (int p = 0; p < 16; p++)
      chk(port_addr[p].offset == 3 && port_addr[p].addr == {8'h79, 4'(p), 16'h0}, "level-2 port strings: bits 19..16");
    route(3'd2, 28'h7900000, -2);          // for this board
    route(3'd3, 28'h79C0000, 12);          // one level down, port 12
    route(3'd5, 28'h7912340, 1);           // deeper: nibble of level 3
    route(3'd1, 28'h7000000, -1);          // offset smaller
    route(3'd3, 28'h78C0000, -1);          // not in this branch
    route(3'd2, 28'h7800000, -1);          // same level, other board
    // level 7: no further levels
    give(3'd7, 28'h1234567);
    @(negedge clk);
    chk(port_addr[0].offset == 0, "level 7 cannot extend");
    // an invalid 1PPS packet
    give(3'd0, 28'h0);
    @(negedge clk);
    chk(!ia && own == '0 && port_addr[2] == '0, "offset 000 invalidates");
    route(3'd1, 28'h0, -1);
    give(3'd1, 28'h3000000);
    @(negedge clk);
    chk(ia, "valid again");
    @(negedge clk); up_los = 1; @(negedge clk); up_los = 0;
    chk(!ia && own == '0, "loss of uplink clears the address");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
