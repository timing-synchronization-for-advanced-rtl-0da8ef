// tb_ligo_timing_full: the top at its real size - 2^26 Hz clock, 2^26-cycle second, 16
// ports, 64-entry FIFO, 9600-baud GPS and PC links. The Master-Fanout board drives its
// own Slave board through 100-cycle fibers on port 0 for a little over two seconds.
//
// Checked: the master's second starts at the external 1PPS; the GPS second decoded from a
// 9600-baud "@@Ha" message; the Slave synchronizes on the first 1PPS packet, takes address
// offset 001 / nibble 0 and the GPS second; its second lags by the fiber and receive
// latency until the delay is known; its return 1PPS packet gives the round trip and the
// port's 1PPS advance (fiber + 5 cycles); a status word from the Slave reaches the PC link
// as 16 bytes at 9600 baud.
module tb_ligo_timing_full;
  import timing_pkg::*;
  localparam int L = 26, NP = 16, D = 100, DIV = 6991;
  localparam int SEC = 1 << L;
  localparam int GPS0 = 872596814;           // GPS time of 2007-08-31 12:00:00 UTC

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  logic ext_pps = 0, gps_rxd = 1, pc_txd, host_ready, up_tx, sl_rx, sl_tx;
  logic st_valid = 0, st_ready, sl_rxv, sl_ia, sl_ta, sl_tc, sl_sync;
  logic [63:0] st_data = '0;
  logic [127:0] local_pkt, sl_rxp;
  logic [NP-1:0] fo_rx, fo_tx, chan_up;
  logic local_valid, is_mfo, ia, ta, tc, synced;
  addr_t own, sl_addr;
  logic [31:0] ts_sec, sl_sec;
  logic [L-1:0] ts_cyc, sl_cyc;
  logic [$clog2(65)-1:0] fifo_count;
  logic [NP-1:0][L-1:0] chan_adv;
  logic [15:0] route_errs, drops, sync_errs, sl_rerr, sl_serr;
  logic [7:0] sl_rs;
  logic dc_tx, dc_txd, dc_busy, dc_done, dc_err;   // DC-imbalance tester, idle here
  logic [15:0] dc_err_cnt;

  ligo_timing_top top (
    .clk, .rst_n,
    .fo_gps_ok(1'b1), .fo_refclk_ok(1'b1), .fo_ext_pps(ext_pps), .fo_gps_rxd(gps_rxd),
    .fo_pc_txd(pc_txd), .fo_host_valid(1'b0), .fo_host_pkt('0), .fo_host_ready(host_ready),
    .fo_up_rx(1'b0), .fo_up_tx(up_tx), .fo_rx, .fo_tx, .fo_local_valid(local_valid),
    .fo_local_pkt(local_pkt), .fo_is_mfo(is_mfo), .fo_addr(own), .fo_ia(ia), .fo_ta(ta),
    .fo_tc(tc), .fo_synced(synced), .fo_ts_sec(ts_sec), .fo_ts_cyc(ts_cyc),
    .fo_fifo_count(fifo_count), .fo_chan_up(chan_up), .fo_chan_adv(chan_adv),
    .fo_route_errs(route_errs), .fo_drops(drops), .fo_sync_errs(sync_errs),
    .sl_up_rx(sl_rx), .sl_up_tx(sl_tx), .sl_status_valid(st_valid), .sl_status_data(st_data),
    .sl_status_id(16'h0077), .sl_status_ready(st_ready), .sl_rx_valid(sl_rxv),
    .sl_rx_pkt(sl_rxp), .sl_addr(sl_addr), .sl_ia(sl_ia), .sl_ta(sl_ta), .sl_tc(sl_tc),
    .sl_synced(sl_sync), .sl_ts_sec(sl_sec), .sl_ts_cyc(sl_cyc), .sl_route_errs(sl_rerr),
    .sl_sync_errs(sl_serr), .sl_resyncs(sl_rs),
    .dc_start(1'b0), .dc_tx(dc_tx), .dc_rx(1'b0), .dc_txd(dc_txd), .dc_busy(dc_busy),
    .dc_done(dc_done), .dc_err(dc_err), .dc_err_cnt(dc_err_cnt)
  );
  fiber #(.D(D)) f_dn (.clk, .plugged(1'b1), .tx(fo_tx[0]), .rx(sl_rx));
  fiber #(.D(D)) f_up (.clk, .plugged(1'b1), .tx(sl_tx), .rx(fo_rx[0]));
  assign fo_rx[NP-1:1] = '0;

  // 1PPS at cycles 1000 + k * 2^26, 10 us wide
  int cycle = 0;
  always @(posedge clk) begin
    cycle++;
    ext_pps <= ((cycle - 1000) % SEC) < 671 && cycle >= 1000;
  end

  task automatic uart_byte(input logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      gps_rxd = f[i];
      repeat (DIV) @(posedge clk);
    end
  endtask

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

  int n_meas = 0;
  logic [L-1:0] first_rtt = '0;
  always @(posedge clk) if (rst_n && top.u_fo.ch_meas[0]) begin
    n_meas++;
    if (n_meas == 1) first_rtt <= top.u_fo.ch_rtt[0];
  end

  initial begin
    repeat (2 * SEC + 3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lag;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    // GPS message for the first second
    wait (ext_pps);
    repeat (20000) @(posedge clk);
    uart_byte("@"); uart_byte("@"); uart_byte("H"); uart_byte("a");
    uart_byte(8); uart_byte(31); uart_byte(8'h07); uart_byte(8'hD7);
    uart_byte(12); uart_byte(0); uart_byte(0);
    for (int i = 0; i < 4; i++) uart_byte(8'h00);
    repeat (100) @(negedge clk);
    chk(is_mfo && synced && ia && own == '0, "master synchronized to the 1PPS");
    chk(ts_sec == GPS0, $sformatf("GPS second %0d", ts_sec));
    chk(!sl_sync, "slave waits for the first 1PPS packet");

    // just after the first second boundary
    wait (cycle == 1000 + SEC + 2000);
    @(negedge clk);
    chk(sl_sync && sl_ia && sl_addr == '{fc: 1'b0, offset: 3'd1, addr: 28'h0}, "slave synchronized and addressed");
    chk(sl_sec == ts_sec && ts_sec == GPS0 + 1, "slave GPS second");
    lag = int'(ts_cyc) - int'(sl_cyc);
    chk(lag == D + 5, $sformatf("slave second lags by fiber + latency (%0d)", lag));

    // a status word to the PC
    st_data = 64'h0123_4567_89AB_CDEF; st_valid = 1;
    do @(posedge clk); while (!st_ready);
    #1 st_valid = 0;

    // after the second boundary the return 1PPS gives the delay
    wait (cycle == 1000 + 2 * SEC + 2000);
    @(negedge clk);
    chk(n_meas == 1 && first_rtt == L'(2 * (D + 5)), $sformatf("round trip %0d", first_rtt));
    chk(chan_adv[0] == L'(D + 5) && chan_up == 16'h0001, $sformatf("port 0 advance %0d", chan_adv[0]));
    wait (pc_bytes.size() >= 16);
    begin
      logic [127:0] p;
      for (int k = 0; k < 16; k++) p[127 - 8 * k -: 8] = pc_bytes[k];
      chk(p[126:96] == {3'd1, 28'h0} && p[95:32] == 64'h0123_4567_89AB_CDEF &&
          p[31:16] == 16'h0077 && crc_ok(p), "status packet on the PC link");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
