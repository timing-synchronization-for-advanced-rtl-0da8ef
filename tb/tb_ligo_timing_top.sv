// tb_ligo_timing_top: end-to-end run of a three-level network built from two copies of
// the top: copy A acts as Master-Fanout (GPS and reference present) with its Slave on
// port 0; copy B's board is a Fanout on A's port 1 with its own Slave on B's port 3.
// Fibers of different lengths join them. The second is shortened to 2^14 cycles and the
// serial links run at 8 cycles per bit; everything else is at its default.
//
// Checked: dynamic addresses of every level, alignment of all four local clocks to the
// master second (to the cycle), GPS second distribution, fiber-delay measurement,
// upstream status packets reaching the PC link in order, downstream routing (absorb,
// forward, misaddressed), flow control (almost-full hold, almost-empty resume), and the
// loss-of-signal invalidation of a whole branch with its recovery, and one run of the
// DC-imbalance test on copy A through a looped-back fiber.
module tb_ligo_timing_top;
  import timing_pkg::*;
  localparam int L = 14, NP = 16, FD = 8, DIV = 8;
  localparam int SEC = 1 << L;
  localparam int DA = 37, DB = 123, DC = 58;    // fiber delays (cycles)

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---------------- copy A: master
  logic a_pps = 0, a_gps_rxd = 1, a_pc_txd, a_host_valid = 0, a_host_ready, a_up_tx;
  logic [127:0] a_host_pkt = '0, a_local_pkt, a_sl_rx_pkt;
  logic [NP-1:0] a_fo_rx, a_fo_tx, a_chan_up;
  logic a_local_valid, a_is_mfo, a_ia, a_ta, a_tc, a_synced;
  addr_t a_addr, a_sl_addr;
  logic [31:0] a_ts_sec, a_sl_ts_sec;
  logic [L-1:0] a_ts_cyc, a_sl_ts_cyc;
  logic [$clog2(FD+1)-1:0] a_fifo_count;
  logic [NP-1:0][L-1:0] a_chan_adv;
  logic [15:0] a_route_errs, a_drops, a_sync_errs, a_sl_route_errs, a_sl_sync_errs;
  logic a_sl_up_rx, a_sl_up_tx, a_sl_status_valid = 0, a_sl_status_ready, a_sl_rx_valid;
  logic [63:0] a_sl_status_data = '0;
  logic a_sl_ia, a_sl_ta, a_sl_tc, a_sl_synced;
  logic [7:0] a_sl_resyncs;
  logic a_dc_start = 0, a_dc_tx, a_dc_rx, a_dc_txd, a_dc_busy, a_dc_done, a_dc_err;
  logic [15:0] a_dc_err_cnt;

  ligo_timing_top #(.SEC_LOG2(L), .NP(NP), .FIFO_DEPTH(FD), .UART_DIV(DIV)) A (
    .clk, .rst_n,
    .fo_gps_ok(1'b1), .fo_refclk_ok(1'b1), .fo_ext_pps(a_pps), .fo_gps_rxd(a_gps_rxd),
    .fo_pc_txd(a_pc_txd), .fo_host_valid(a_host_valid), .fo_host_pkt(a_host_pkt),
    .fo_host_ready(a_host_ready), .fo_up_rx(1'b0), .fo_up_tx(a_up_tx),
    .fo_rx(a_fo_rx), .fo_tx(a_fo_tx), .fo_local_valid(a_local_valid),
    .fo_local_pkt(a_local_pkt), .fo_is_mfo(a_is_mfo), .fo_addr(a_addr), .fo_ia(a_ia),
    .fo_ta(a_ta), .fo_tc(a_tc), .fo_synced(a_synced), .fo_ts_sec(a_ts_sec),
    .fo_ts_cyc(a_ts_cyc), .fo_fifo_count(a_fifo_count), .fo_chan_up(a_chan_up),
    .fo_chan_adv(a_chan_adv), .fo_route_errs(a_route_errs), .fo_drops(a_drops),
    .fo_sync_errs(a_sync_errs),
    .sl_up_rx(a_sl_up_rx), .sl_up_tx(a_sl_up_tx), .sl_status_valid(a_sl_status_valid),
    .sl_status_data(a_sl_status_data), .sl_status_id(16'h0001),
    .sl_status_ready(a_sl_status_ready), .sl_rx_valid(a_sl_rx_valid), .sl_rx_pkt(a_sl_rx_pkt),
    .sl_addr(a_sl_addr), .sl_ia(a_sl_ia), .sl_ta(a_sl_ta), .sl_tc(a_sl_tc),
    .sl_synced(a_sl_synced), .sl_ts_sec(a_sl_ts_sec), .sl_ts_cyc(a_sl_ts_cyc),
    .sl_route_errs(a_sl_route_errs), .sl_sync_errs(a_sl_sync_errs), .sl_resyncs(a_sl_resyncs),
    .dc_start(a_dc_start), .dc_tx(a_dc_tx), .dc_rx(a_dc_rx), .dc_txd(a_dc_txd),
    .dc_busy(a_dc_busy), .dc_done(a_dc_done), .dc_err(a_dc_err), .dc_err_cnt(a_dc_err_cnt)
  );

  // ---------------- copy B: fanout on A's port 1
  logic b_pc_txd, b_host_ready, b_up_rx, b_up_tx;
  logic [127:0] b_local_pkt, b_sl_rx_pkt;
  logic [NP-1:0] b_fo_rx, b_fo_tx, b_chan_up;
  logic b_local_valid, b_is_mfo, b_ia, b_ta, b_tc, b_synced;
  addr_t b_addr, b_sl_addr;
  logic [31:0] b_ts_sec, b_sl_ts_sec;
  logic [L-1:0] b_ts_cyc, b_sl_ts_cyc;
  logic [$clog2(FD+1)-1:0] b_fifo_count;
  logic [NP-1:0][L-1:0] b_chan_adv;
  logic [15:0] b_route_errs, b_drops, b_sync_errs, b_sl_route_errs, b_sl_sync_errs;
  logic b_sl_up_rx, b_sl_up_tx, b_sl_status_valid = 0, b_sl_status_ready, b_sl_rx_valid;
  logic [63:0] b_sl_status_data = '0;
  logic b_sl_ia, b_sl_ta, b_sl_tc, b_sl_synced;
  logic [7:0] b_sl_resyncs;
  logic b_dc_start = 0, b_dc_tx, b_dc_rx, b_dc_txd, b_dc_busy, b_dc_done, b_dc_err;
  logic [15:0] b_dc_err_cnt;

  ligo_timing_top #(.SEC_LOG2(L), .NP(NP), .FIFO_DEPTH(FD), .UART_DIV(DIV)) B (
    .clk, .rst_n,
    .fo_gps_ok(1'b0), .fo_refclk_ok(1'b0), .fo_ext_pps(1'b0), .fo_gps_rxd(1'b1),
    .fo_pc_txd(b_pc_txd), .fo_host_valid(1'b0), .fo_host_pkt('0),
    .fo_host_ready(b_host_ready), .fo_up_rx(b_up_rx), .fo_up_tx(b_up_tx),
    .fo_rx(b_fo_rx), .fo_tx(b_fo_tx), .fo_local_valid(b_local_valid),
    .fo_local_pkt(b_local_pkt), .fo_is_mfo(b_is_mfo), .fo_addr(b_addr), .fo_ia(b_ia),
    .fo_ta(b_ta), .fo_tc(b_tc), .fo_synced(b_synced), .fo_ts_sec(b_ts_sec),
    .fo_ts_cyc(b_ts_cyc), .fo_fifo_count(b_fifo_count), .fo_chan_up(b_chan_up),
    .fo_chan_adv(b_chan_adv), .fo_route_errs(b_route_errs), .fo_drops(b_drops),
    .fo_sync_errs(b_sync_errs),
    .sl_up_rx(b_sl_up_rx), .sl_up_tx(b_sl_up_tx), .sl_status_valid(b_sl_status_valid),
    .sl_status_data(b_sl_status_data), .sl_status_id(16'h0002),
    .sl_status_ready(b_sl_status_ready), .sl_rx_valid(b_sl_rx_valid), .sl_rx_pkt(b_sl_rx_pkt),
    .sl_addr(b_sl_addr), .sl_ia(b_sl_ia), .sl_ta(b_sl_ta), .sl_tc(b_sl_tc),
    .sl_synced(b_sl_synced), .sl_ts_sec(b_sl_ts_sec), .sl_ts_cyc(b_sl_ts_cyc),
    .sl_route_errs(b_sl_route_errs), .sl_sync_errs(b_sl_sync_errs), .sl_resyncs(b_sl_resyncs),
    .dc_start(b_dc_start), .dc_tx(b_dc_tx), .dc_rx(b_dc_rx), .dc_txd(b_dc_txd),
    .dc_busy(b_dc_busy), .dc_done(b_dc_done), .dc_err(b_dc_err), .dc_err_cnt(b_dc_err_cnt)
  );

  // ---------------- fibers
  logic ab_plugged = 1;
  fiber #(.D(DA)) f_a0d (.clk, .plugged(1'b1), .tx(a_fo_tx[0]), .rx(a_sl_up_rx));
  fiber #(.D(DA)) f_a0u (.clk, .plugged(1'b1), .tx(a_sl_up_tx), .rx(a_fo_rx[0]));
  fiber #(.D(DB)) f_a1d (.clk, .plugged(ab_plugged), .tx(a_fo_tx[1]), .rx(b_up_rx));
  fiber #(.D(DB)) f_a1u (.clk, .plugged(ab_plugged), .tx(b_up_tx), .rx(a_fo_rx[1]));
  fiber #(.D(DC)) f_b3d (.clk, .plugged(1'b1), .tx(b_fo_tx[3]), .rx(b_sl_up_rx));
  fiber #(.D(DC)) f_b3u (.clk, .plugged(1'b1), .tx(b_sl_up_tx), .rx(b_fo_rx[3]));
  // DC-imbalance test on A: its line loops back through a 29-cycle fiber
  logic dc_plugged = 0;
  fiber #(.D(29)) f_dc (.clk, .plugged(dc_plugged), .tx(a_dc_tx), .rx(a_dc_rx));
  assign b_dc_rx = 1'b0;
  always_comb begin
    a_fo_rx[NP-1:2] = '0;
    b_fo_rx[2:0]    = '0;
    b_fo_rx[NP-1:4] = '0;
  end

  // ---------------- reference: 1PPS and GPS messages
  int cycle = 0, sec_no = 0;
  always @(posedge clk) begin
    cycle++;
    a_pps <= (cycle % SEC) < 100;            // 1PPS pulse at each second
    if (cycle % SEC == 0) sec_no++;
  end

  // GPS message for the second that just began: 2007-08-31 12:00:00 + sec_no
  localparam int GPS0 = 872596814;          // GPS time of 2007-08-31 12:00:00 UTC
  task automatic uart_byte(input logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      a_gps_rxd = f[i];
      repeat (DIV) @(posedge clk);
    end
  endtask
  initial begin
    forever begin
      int s, sn;
      @(posedge a_pps);
      sn = sec_no;
      s  = sn % 60;
      repeat (200) @(posedge clk);
      uart_byte("@"); uart_byte("@"); uart_byte("H"); uart_byte("a");
      uart_byte(8); uart_byte(31); uart_byte(8'h07); uart_byte(8'hD7);
      uart_byte(12); uart_byte(8'(sn / 60)); uart_byte(8'(s));
      for (int i = 0; i < 20; i++) uart_byte(8'h11);
    end
  end

  // ---------------- PC link receiver (A's RS422 output)
  logic [7:0] pc_bytes[$];
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge a_pc_txd);
      repeat (DIV / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (DIV) @(posedge clk);
        b[i] = a_pc_txd;
      end
      repeat (DIV) @(posedge clk);
      pc_bytes.push_back(b);
    end
  end

  // ---------------- mechanism counters
  int n_af = 0, n_ae = 0, n_tc_a = 0, n_tc_b = 0, n_hold_b = 0, n_adj = 0, n_resync = 0;
  int n_dc = 0;
  initial begin : dc_test
    wait (rst_n);
    repeat (4) @(posedge clk);
    dc_plugged = 1;
    @(posedge clk); #1 a_dc_start = 1;
    @(posedge clk); #1 a_dc_start = 0;
    wait (a_dc_done);
    @(negedge clk);
    chk(!a_dc_err && a_dc_err_cnt == 0, "DC-imbalance string returned intact");
    if (!a_dc_err) n_dc++;
  end
  int n_gps = 0, n_fwd = 0, n_absorb_b = 0, n_absorb_sb = 0, n_invalid = 0, n_recover = 0;
  logic prev_sl_tc = 0;
  logic [63:0] sb_rx_payload = '0;
  always @(posedge clk) if (rst_n) begin
    if (A.u_fo.fc_req &&  A.u_fo.fc_val) n_af++;
    if (A.u_fo.fc_req && !A.u_fo.fc_val) n_ae++;
    if (a_sl_tc && !prev_sl_tc) n_tc_a++;
    prev_sl_tc <= a_sl_tc;
    if (b_tc) n_tc_b++;
    if (|A.u_fo.ch_adj || |B.u_fo.ch_adj) n_adj++;
    if (A.u_fo.conv_valid) n_gps++;
    if (A.u_fo.rt_valid && A.u_fo.r_forward) n_fwd++;
    if (B.u_fo.fc_req && B.u_fo.fc_val) n_hold_b++;
    if (b_sl_rx_valid) begin n_absorb_sb++; sb_rx_payload <= b_sl_rx_pkt[95:32]; end
    if (b_local_valid) n_absorb_b++;
  end

  // ---------------- slaves: stream numbered status words when enabled
  bit flood = 0;
  longint sa_sent = 0, sb_sent = 0;
  always @(posedge clk) if (rst_n && flood) begin
    if (a_sl_status_ready && !a_sl_status_valid) begin
      a_sl_status_valid <= 1; a_sl_status_data <= {32'hA, 32'(sa_sent)}; sa_sent++;
    end else a_sl_status_valid <= 0;
    if (b_sl_status_ready && !b_sl_status_valid) begin
      b_sl_status_valid <= 1; b_sl_status_data <= {32'hB, 32'(sb_sent)}; sb_sent++;
    end else b_sl_status_valid <= 0;
  end else begin
    a_sl_status_valid <= 0; b_sl_status_valid <= 0;
  end

  // ---------------- watchdog
  initial begin
    repeat (60 * SEC) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host_send(input logic [2:0] off, input logic [27:0] a, input logic [63:0] pl);
    @(negedge clk);
    a_host_pkt = '0;
    a_host_pkt[126:124] = off; a_host_pkt[123:96] = a; a_host_pkt[95:32] = pl;
    a_host_pkt[31:16] = 16'h0042;
    a_host_valid = 1;
    do @(posedge clk); while (!a_host_ready);   // taken on this edge
    #1 a_host_valid = 0;
  endtask

  function automatic logic [127:0] pc_packet(input int i);
    logic [127:0] p;
    for (int k = 0; k < 16; k++) p[127 - 8 * k -: 8] = pc_bytes[16 * i + k];
    return p;
  endfunction

  initial begin
    int align_bad, sec_bad;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    // let addresses and delays settle
    wait (sec_no == 16);
    repeat (5000) @(negedge clk);
    chk(a_is_mfo && a_ia && a_addr.offset == 0, "master address");
    chk(!b_is_mfo && b_ia && b_addr.offset == 1 && b_addr.addr == 28'h1000000, "fanout on port 1: level 1, nibble 1");
    chk(a_sl_ia && a_sl_addr.offset == 1 && a_sl_addr.addr == 28'h0000000, "slave on port 0: level 1, nibble 0");
    chk(b_sl_ia && b_sl_addr.offset == 2 && b_sl_addr.addr == 28'h1300000, "slave below: level 2, nibbles 1,3");
    // fiber delays: every advance exceeds its one-way delay by the same pipeline constant
    chk(int'(a_chan_adv[0]) - DA == int'(a_chan_adv[1]) - DB &&
        int'(a_chan_adv[1]) - DB == int'(b_chan_adv[3]) - DC &&
        int'(a_chan_adv[0]) > DA, $sformatf("advances %0d %0d %0d", a_chan_adv[0], a_chan_adv[1], b_chan_adv[3]));
    n_resync = a_sl_resyncs + b_sl_resyncs;
    chk(a_sl_resyncs >= 2 && b_sl_resyncs >= 2, "slaves re-synchronized after the advance changed");
    // one full second of cycle-exact alignment and equal GPS seconds
    align_bad = 0; sec_bad = 0;
    for (int c = 0; c < SEC; c++) begin
      @(negedge clk);
      if (!(a_ts_cyc == a_sl_ts_cyc && a_ts_cyc == b_ts_cyc && a_ts_cyc == b_sl_ts_cyc)) align_bad++;
      if (!(a_ts_sec == a_sl_ts_sec && a_ts_sec == b_ts_sec && a_ts_sec == b_sl_ts_sec)) sec_bad++;
    end
    chk(align_bad == 0, $sformatf("all clocks on the master second (%0d bad cycles)", align_bad));
    chk(sec_bad == 0, $sformatf("all GPS seconds equal (%0d bad cycles)", sec_bad));
    chk(a_ts_sec == GPS0 + sec_no, $sformatf("GPS second %0d expected %0d", a_ts_sec, GPS0 + sec_no));

    // downstream routing from the PC side
    host_send(3'd2, 28'h1300000, 64'hCAFE_0001);       // to the level-2 slave
    host_send(3'd1, 28'h1000000, 64'hCAFE_0002);       // to the fanout itself
    host_send(3'd2, 28'h0500000, 64'hCAFE_0003);       // through a slave: misaddressed
    repeat (8 * 1024) @(negedge clk);
    chk(n_absorb_sb == 1 && sb_rx_payload == 64'hCAFE_0001, "packet reached the level-2 slave");
    chk(n_absorb_b == 1, "packet absorbed by the fanout");
    chk(a_sl_route_errs == 1, "misaddressed packet flagged at the slave");

    // upstream flood: the PC link is slower than two slaves, so flow control must act
    flood = 1;
    repeat (3 * SEC) @(negedge clk);
    flood = 0;
    repeat (3 * SEC) @(negedge clk);
    begin
      longint next_a = 0, next_b = 0;
      int npk, bad_src, order;
      npk = pc_bytes.size() / 16;
      bad_src = 0; order = 0;
      for (int i = 0; i < npk; i++) begin
        logic [127:0] p;
        p = pc_packet(i);
        if (p[95:64] == 32'hA) begin
          if (p[126:96] != {3'd1, 28'h0000000}) bad_src++;
          if (p[63:32] != 32'(next_a)) order++;
          next_a = p[63:32] + 1;
        end else if (p[95:64] == 32'hB) begin
          if (p[126:96] != {3'd2, 28'h1300000}) bad_src++;
          if (p[63:32] != 32'(next_b)) order++;
          next_b = p[63:32] + 1;
        end else bad_src++;
      end
      chk(npk > 20, $sformatf("packets reached the PC (%0d)", npk));
      chk(bad_src == 0, "source addresses attached");
      chk(order == 0, "no packet lost or reordered");
      chk(next_a == sa_sent && next_b == sb_sent, $sformatf("all status words delivered (%0d/%0d, %0d/%0d)", next_a, sa_sent, next_b, sb_sent));
      chk(a_drops == 0 && b_drops == 0, "no drops in the fanouts");
    end

    // unplug the fanout: the branch loses its addresses, then recovers
    ab_plugged = 0;
    repeat (2 * SEC) @(negedge clk);
    chk(!b_ia && !b_sl_ia, "branch invalidated after loss of signal");
    if (!b_ia && !b_sl_ia) n_invalid++;
    ab_plugged = 1;
    repeat (12 * SEC) @(negedge clk);
    chk(b_ia && b_sl_ia && b_sl_addr.addr == 28'h1300000, "branch addresses recovered");
    if (b_ia && b_sl_ia) n_recover++;
    chk(b_ts_cyc == a_ts_cyc && b_sl_ts_cyc == a_ts_cyc, "branch re-synchronized");

    // every mechanism happened
    chk(n_af > 0, "almost-full flow-control packet sent");
    chk(n_ae > 0, "almost-empty flow-control packet sent");
    chk(n_tc_a > 0 && n_tc_b > 0, "TC raised below the master");
    chk(n_hold_b > 0, "fanout FIFO reached almost full while held");
    chk(n_resync > 0, "re-synchronization");
    chk(n_adj >= 3, "fiber delay written on every link");
    chk(n_invalid > 0 && n_recover > 0, "invalidation and recovery");
    chk(n_gps > 10, "GPS messages decoded");
    chk(n_fwd >= 3, "packets forwarded downstream");
    chk(n_dc > 0, "DC-imbalance test run");
    $display("dc tests=%0d", n_dc);
    $display("mechanisms: af=%0d ae=%0d tcA=%0d tcB=%0d holdB=%0d resyncs=%0d adj=%0d gps=%0d fwd=%0d absorbB=%0d absorbSB=%0d pkts=%0d",
             n_af, n_ae, n_tc_a, n_tc_b, n_hold_b, n_resync, n_adj, n_gps, n_fwd, n_absorb_b, n_absorb_sb, pc_bytes.size() / 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
