// tb_fanout_channel: one fanout channel driving a Slave over a pair of fibers (45 cycles
// each way), on a free-running local timebase with a 2^13-cycle second.
//
// Checked: the fiber delay is measured and the 1PPS advanced so that the Slave's second
// coincides with the local one to the cycle; the Slave takes its address and GPS second
// from the channel's 1PPS packets; a routed packet reaches the Slave, a second one while
// the buffer is occupied is dropped; the Slave's status packets come back on up_valid;
// a hold flow-control packet stops them and a resume packet restarts them; unplugging
// the fiber drops the link, and after replugging the delay is measured afresh.
module tb_fanout_channel;
  import timing_pkg::*;
  localparam int L = 13, D = 45;
  localparam int SEC = 1 << L;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // local timebase
  logic [L-1:0] cyc;
  logic sec_pulse, bs, ss;
  timebase #(.SEC_LOG2(L)) u_tb (.clk, .rst_n, .load(1'b0), .cyc, .sec_pulse, .bit_start(bs),
                                 .slot_start(ss));
  logic [31:0] gps = 32'd1000;
  always @(posedge clk) if (rst_n && sec_pulse) gps <= gps + 1;

  // channel
  pps_pkt_t pp;
  always_comb begin
    pp = '0;
    pp.a = '{fc: 1'b0, offset: 3'd1, addr: 28'h2000000};
    pp.gps_sec = gps + 1;
  end
  logic fc_req = 0, fc_val = 0, down_valid = 0, plugged = 1;
  logic [127:0] down_pkt = '0, up_pkt;
  logic down_drop, down_full, ch_rx, ch_tx, up_valid, crc_err, link_up, meas_valid, adjusted;
  logic [L-1:0] adv, rtt;
  fanout_channel #(.SEC_LOG2(L)) dut (
    .clk, .rst_n, .cyc, .pps_en(1'b1), .meas_en(1'b1), .pps_pkt(pp), .fc_req, .fc_val,
    .own('0), .down_valid, .down_pkt, .down_drop, .down_full, .rx_line(ch_rx),
    .tx_line(ch_tx), .up_valid, .up_pkt, .crc_err, .link_up, .adv, .rtt, .meas_valid,
    .adjusted
  );

  // fibers and slave
  logic s_rx, s_tx, st_valid = 0, st_ready, s_rx_valid, s_ia, s_ta, s_tc, s_synced;
  logic [63:0] st_data = '0;
  logic [127:0] s_rx_pkt;
  addr_t s_addr;
  logic [31:0] s_sec;
  logic [L-1:0] s_cyc;
  logic [15:0] s_rerr, s_serr;
  logic [7:0] s_resyncs;
  fiber #(.D(D)) f_down (.clk, .plugged, .tx(ch_tx), .rx(s_rx));
  fiber #(.D(D)) f_up   (.clk, .plugged, .tx(s_tx), .rx(ch_rx));
  slave_fpga #(.SEC_LOG2(L)) u_sl (
    .clk, .rst_n, .up_rx(s_rx), .up_tx(s_tx), .status_valid(st_valid), .status_data(st_data),
    .status_id(16'h0007), .status_ready(st_ready), .rx_valid(s_rx_valid), .rx_pkt(s_rx_pkt),
    .own_addr(s_addr), .ia(s_ia), .ta(s_ta), .tc(s_tc), .synced(s_synced), .ts_sec(s_sec),
    .ts_cyc(s_cyc), .route_errs(s_rerr), .sync_errs(s_serr), .resyncs(s_resyncs)
  );

  int n_adj = 0, n_up = 0, n_srx = 0, n_drop = 0;
  logic [127:0] last_up = '0, last_srx = '0;
  always @(posedge clk) if (rst_n) begin
    if (adjusted) n_adj++;
    if (up_valid) begin n_up++; last_up <= up_pkt; end
    if (s_rx_valid) begin n_srx++; last_srx <= s_rx_pkt; end
    if (down_drop) n_drop++;
  end

  initial begin
    repeat (40 * SEC) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bad, n0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    repeat (8 * SEC) @(negedge clk);
    chk(adv == D + 5 && rtt == 2 * (D + 5), $sformatf("delay measured: adv %0d rtt %0d", adv, rtt));
    chk(link_up && s_synced && s_ia && s_addr.offset == 1 && s_addr.addr == 28'h2000000,
        "slave synchronized and addressed");
    bad = 0;
    for (int i = 0; i < SEC; i++) begin
      @(negedge clk);
      if (s_cyc != cyc || s_sec != gps) bad++;
    end
    chk(bad == 0, $sformatf("slave second equals the local second (%0d bad cycles)", bad));

    // routed packets
    @(negedge clk);
    down_pkt = '0; down_pkt[126:96] = {3'd1, 28'h2000000}; down_pkt[95:32] = 64'h1234;
    down_valid = 1; @(negedge clk);
    down_pkt[95:32] = 64'h5678; @(negedge clk); down_valid = 0;
    @(negedge clk);
    chk(down_full && n_drop == 1, "second packet dropped while the buffer is occupied");
    repeat (3 * 1024) @(negedge clk);
    chk(!down_full && n_srx == 1 && last_srx[95:32] == 64'h1234, "packet delivered to the slave");

    // status packets upward
    n0 = n_up;
    for (int i = 0; i < 3; i++) begin
      @(negedge clk); st_data = 64'hAB00 + 64'(i); st_valid = 1;
      do @(posedge clk); while (!st_ready);
      #1 st_valid = 0;
    end
    repeat (5 * 1024) @(negedge clk);
    chk(n_up - n0 == 3 && last_up[126:96] == {3'd1, 28'h2000000} && last_up[95:32] == 64'hAB02
        && last_up[31:16] == 16'h0007, $sformatf("status packets received (%0d)", n_up - n0));

    // flow control: hold, then resume
    @(negedge clk); fc_req = 1; fc_val = 1; @(negedge clk); fc_req = 0;
    repeat (3 * 1024) @(negedge clk);
    chk(s_tc && !s_ta, "hold packet sets TC at the slave");
    n0 = n_up;
    @(negedge clk); st_data = 64'hCC; st_valid = 1; @(negedge clk); st_valid = 0;
    repeat (4 * 1024) @(negedge clk);
    chk(n_up == n0, "slave holds its packet");
    @(negedge clk); fc_req = 1; fc_val = 0; @(negedge clk); fc_req = 0;
    repeat (4 * 1024) @(negedge clk);
    chk(!s_tc && s_ta && n_up == n0 + 1 && last_up[95:32] == 64'hCC, "resume releases it");

    // unplug and replug
    n0 = n_adj;
    plugged = 0;
    repeat (500) @(negedge clk);
    chk(!link_up && !s_ia, "link lost on both ends");
    plugged = 1;
    repeat (6 * SEC) @(negedge clk);
    chk(link_up && n_adj > n0 && adv == D + 5, "delay measured afresh after replugging");
    chk(s_cyc == cyc && s_ia, "slave back on the local second");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
