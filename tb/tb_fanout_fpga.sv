// tb_fanout_fpga: a Master-Fanout board (GPS receiver and reference present) with two
// Slaves on ports 2 and 5 over fibers of 30 and 70 cycles. The second is shortened to
// 2^14 cycles, the FIFO to 8 entries, and the serial links run at 8 cycles per bit.
//
// Checked: master role and address; alignment of the local second to the external 1PPS
// and of both Slaves to it (to the cycle) after the delays are measured; the GPS second
// decoded from the receiver's "@@Ha" messages and handed to the Slaves; downstream routing
// of PC-side packets to each Slave; status packets of both Slaves delivered over the PC
// link with their source addresses; losing the reference clock turns the board into a
// Fanout without uplink (address invalid, 1PPS packets carry offset 000).
module tb_fanout_fpga;
  import timing_pkg::*;
  localparam int L = 14, NP = 16, FD = 8, DIV = 8;
  localparam int SEC = 1 << L;
  localparam int D2 = 30, D5 = 70;
  localparam int GPS0 = 872596814;           // GPS time of 2007-08-31 12:00:00 UTC

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  logic refclk_ok = 1, ext_pps = 0, gps_rxd = 1, pc_txd, host_valid = 0, host_ready, up_tx;
  logic [127:0] host_pkt = '0, local_pkt;
  logic [NP-1:0] fo_rx, fo_tx, chan_up;
  logic local_valid, is_mfo, ia, ta, tc, synced;
  addr_t own;
  logic [31:0] ts_sec;
  logic [L-1:0] ts_cyc;
  logic [$clog2(FD+1)-1:0] fifo_count;
  logic [NP-1:0][L-1:0] chan_adv;
  logic [15:0] route_errs, drops, sync_errs;

  fanout_fpga #(.SEC_LOG2(L), .NP(NP), .FIFO_DEPTH(FD), .UART_DIV(DIV)) dut (
    .clk, .rst_n, .gps_ok(1'b1), .refclk_ok, .ext_pps, .gps_rxd, .pc_txd, .host_valid,
    .host_pkt, .host_ready, .up_rx(1'b0), .up_tx, .fo_rx, .fo_tx, .local_valid, .local_pkt,
    .is_mfo, .own_addr(own), .ia, .ta, .tc, .synced, .ts_sec, .ts_cyc, .fifo_count, .chan_up,
    .chan_adv, .route_errs, .drops, .sync_errs
  );

  // two slaves
  logic [1:0] s_rx, s_tx, st_valid = '0, st_ready, s_rxv, s_ia, s_ta, s_tc, s_sync;
  logic [1:0][63:0] st_data = '0;
  logic [1:0][127:0] s_rxp;
  addr_t [1:0] s_addr;
  logic [1:0][31:0] s_sec;
  logic [1:0][L-1:0] s_cyc;
  logic [1:0][15:0] s_rerr, s_serr;
  logic [1:0][7:0] s_rs;
  fiber #(.D(D2)) f2d (.clk, .plugged(1'b1), .tx(fo_tx[2]), .rx(s_rx[0]));
  fiber #(.D(D2)) f2u (.clk, .plugged(1'b1), .tx(s_tx[0]), .rx(fo_rx[2]));
  fiber #(.D(D5)) f5d (.clk, .plugged(1'b1), .tx(fo_tx[5]), .rx(s_rx[1]));
  fiber #(.D(D5)) f5u (.clk, .plugged(1'b1), .tx(s_tx[1]), .rx(fo_rx[5]));
  always_comb begin
    fo_rx[1:0] = '0; fo_rx[4:3] = '0; fo_rx[NP-1:6] = '0;
  end
  for (genvar i = 0; i < 2; i++) begin : g_s
    slave_fpga #(.SEC_LOG2(L)) u_s (
      .clk, .rst_n, .up_rx(s_rx[i]), .up_tx(s_tx[i]), .status_valid(st_valid[i]),
      .status_data(st_data[i]), .status_id(16'(i + 1)), .status_ready(st_ready[i]),
      .rx_valid(s_rxv[i]), .rx_pkt(s_rxp[i]), .own_addr(s_addr[i]), .ia(s_ia[i]),
      .ta(s_ta[i]), .tc(s_tc[i]), .synced(s_sync[i]), .ts_sec(s_sec[i]), .ts_cyc(s_cyc[i]),
      .route_errs(s_rerr[i]), .sync_errs(s_serr[i]), .resyncs(s_rs[i])
    );
  end

  // 1PPS and GPS messages (the message after each pulse describes that second)
  int cycle = 0, sec_no = 0;
  always @(posedge clk) begin
    cycle++;
    if (cycle % SEC == 0) sec_no++;
    ext_pps <= (cycle % SEC) >= 10 && (cycle % SEC) < 110;
  end
  task automatic uart_byte(input logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      gps_rxd = f[i];
      repeat (DIV) @(posedge clk);
    end
  endtask
  initial begin
    forever begin
      int sn;
      @(posedge ext_pps);
      sn = sec_no;
      repeat (300) @(posedge clk);
      uart_byte("@"); uart_byte("@"); uart_byte("H"); uart_byte("a");
      uart_byte(8); uart_byte(31); uart_byte(8'h07); uart_byte(8'hD7);
      uart_byte(12); uart_byte(8'(sn / 60)); uart_byte(8'(sn % 60));
      for (int i = 0; i < 20; i++) uart_byte(8'h00);
    end
  end

  // PC link receiver
  logic [7:0] pc_bytes[$];
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge pc_txd);
      repeat (DIV / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (DIV) @(posedge clk);
        b[i] = pc_txd;
      end
      repeat (DIV) @(posedge clk);
      pc_bytes.push_back(b);
    end
  end

  int n_rx0 = 0, n_rx1 = 0;
  logic [63:0] rx_pl0 = '0, rx_pl1 = '0;
  always @(posedge clk) if (rst_n) begin
    if (s_rxv[0]) begin n_rx0++; rx_pl0 <= s_rxp[0][95:32]; end
    if (s_rxv[1]) begin n_rx1++; rx_pl1 <= s_rxp[1][95:32]; end
  end

  initial begin
    repeat (30 * SEC) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host_send(input logic [2:0] off, input logic [27:0] a, input logic [63:0] pl);
    @(negedge clk);
    host_pkt = '0; host_pkt[126:124] = off; host_pkt[123:96] = a; host_pkt[95:32] = pl;
    host_valid = 1;
    do @(posedge clk); while (!host_ready);
    #1 host_valid = 0;
  endtask

  initial begin
    int bad, e0, npk, ok0, ok1;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    wait (sec_no == 10);
    repeat (2000) @(negedge clk);
    chk(is_mfo && ia && own == '0 && synced, "master role, address offset 000");
    chk(chan_up == 16'b0000_0000_0010_0100, "links up on ports 2 and 5");
    chk(chan_adv[2] == D2 + 5 && chan_adv[5] == D5 + 5,
        $sformatf("port advances %0d %0d", chan_adv[2], chan_adv[5]));
    chk(s_addr[0] == '{fc: 1'b0, offset: 3'd1, addr: 28'h2000000} &&
        s_addr[1] == '{fc: 1'b0, offset: 3'd1, addr: 28'h5000000} && &s_ia, "slave addresses");
    e0 = sync_errs;
    bad = 0;
    for (int i = 0; i < SEC; i++) begin
      logic pps_q;
      pps_q = ext_pps;
      @(negedge clk);
      // the input synchronizer puts count 0 two cycles after the pin rises
      if (ext_pps && !pps_q && ts_cyc != L'(SEC - 2)) bad++;
      if (s_cyc[0] != ts_cyc || s_cyc[1] != ts_cyc) bad++;
      if (s_sec[0] != ts_sec || s_sec[1] != ts_sec) bad++;
    end
    chk(bad == 0 && sync_errs == e0, $sformatf("master on the 1PPS, slaves on the master (%0d)", bad));
    chk(ts_sec == GPS0 + sec_no, $sformatf("GPS second %0d, expected %0d", ts_sec, GPS0 + sec_no));

    // PC-side packets to each slave
    host_send(3'd1, 28'h2000000, 64'hD0D0);
    host_send(3'd1, 28'h5000000, 64'hD5D5);
    repeat (3 * 1024) @(negedge clk);
    chk(n_rx0 == 1 && rx_pl0 == 64'hD0D0 && n_rx1 == 1 && rx_pl1 == 64'hD5D5,
        "routed to the right slave");

    // status from both slaves to the PC
    for (int k = 0; k < 3; k++) begin
      @(negedge clk);
      st_data[0] = 64'h5100 + 64'(k); st_data[1] = 64'h5500 + 64'(k); st_valid = 2'b11;
      @(negedge clk); st_valid = 2'b00;
      repeat (1500) @(negedge clk);
    end
    repeat (SEC / 2) @(negedge clk);
    npk = pc_bytes.size() / 16;
    ok0 = 0; ok1 = 0;
    for (int i = 0; i < npk; i++) begin
      logic [127:0] p;
      for (int k = 0; k < 16; k++) p[127 - 8 * k -: 8] = pc_bytes[16 * i + k];
      if (p[126:96] == {3'd1, 28'h2000000} && p[95:40] == 56'h51 && p[31:16] == 16'd1) ok0++;
      if (p[126:96] == {3'd1, 28'h5000000} && p[95:40] == 56'h55 && p[31:16] == 16'd2) ok1++;
    end
    chk(npk == 6 && ok0 == 3 && ok1 == 3, $sformatf("status packets on the PC link (%0d)", npk));

    // reference clock removed: no longer master, no uplink
    refclk_ok = 0;
    repeat (2 * SEC) @(negedge clk);
    chk(!is_mfo && !ia && !s_ia[0] && !s_ia[1], "without reference the branch is invalid");
    refclk_ok = 1;
    repeat (3 * SEC) @(negedge clk);
    chk(is_mfo && ia && s_ia[0] && s_ia[1], "master again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
