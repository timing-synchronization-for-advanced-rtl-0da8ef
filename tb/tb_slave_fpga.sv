// tb_slave_fpga: a Slave fed by a stand-in upstream transmitter (packet transmitter on a
// free-running timebase, 2^13-cycle second, 20-cycle fiber); the Slave's uplink output is
// decoded by a receiver chain in the testbench.
//
// Checked: first 1PPS synchronizes the Slave and gives it its address and GPS second; the
// return 1PPS packet carries the Slave's address, the locked flag and a good CRC; a move
// of the upstream second by 100 cycles is tolerated twice and re-synchronizes on the
// third edge (locked drops meanwhile); data packets: own address absorbed, other address
// and deeper level counted as routing errors; flow-control hold/resume (TC, TA); an
// invalid (offset 000) address string clears the address; loss of signal clears it too.
module tb_slave_fpga;
  import timing_pkg::*;
  localparam int L = 13, D = 20;
  localparam int SEC = 1 << L;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // upstream stand-in
  logic [L-1:0] cyc, up_adv = '0;
  logic sec_pulse, bs, ss;
  timebase #(.SEC_LOG2(L)) u_tb (.clk, .rst_n, .load(1'b0), .cyc, .sec_pulse, .bit_start(bs),
                                 .slot_start(ss));
  logic [31:0] gps = 32'd500;
  always @(posedge clk) if (rst_n && sec_pulse) gps <= gps + 1;
  addr_t    pps_a = '{fc: 1'b0, offset: 3'd2, addr: 28'h35_00000};
  pps_pkt_t pp;
  always_comb begin
    pp = '0; pp.a = pps_a; pp.gps_sec = gps + 1;
  end
  logic dv = 0, dack, ch_sec, line_dn, plugged = 1, s_rx;
  logic [127:0] dpkt = '0;
  packet_tx #(.SEC_LOG2(L)) u_up (
    .clk, .rst_n, .cyc, .adv(up_adv), .pps_en(1'b1), .pps_pkt(pp), .data_valid(dv),
    .data_pkt(dpkt), .data_ack(dack), .ch_sec, .line(line_dn)
  );
  fiber #(.D(D)) f_dn (.clk, .plugged, .tx(line_dn), .rx(s_rx));

  // device under test
  logic s_tx, st_valid = 0, st_ready, rx_valid, ia, ta, tc, synced;
  logic [63:0] st_data = '0;
  logic [127:0] rx_pkt;
  addr_t own;
  logic [31:0] ts_sec;
  logic [L-1:0] ts_cyc;
  logic [15:0] route_errs, sync_errs;
  logic [7:0] resyncs;
  slave_fpga #(.SEC_LOG2(L)) dut (
    .clk, .rst_n, .up_rx(s_rx), .up_tx(s_tx), .status_valid(st_valid), .status_data(st_data),
    .status_id(16'h00AA), .status_ready(st_ready), .rx_valid, .rx_pkt, .own_addr(own), .ia,
    .ta, .tc, .synced, .ts_sec, .ts_cyc, .route_errs, .sync_errs, .resyncs
  );

  // receiver for the Slave's uplink output
  logic r_rise, r_sv, r_los, r_mark, r_al, r_pv, r_ce, r_ppv, r_pok, r_pe;
  sym_t r_sym;
  logic [127:0] r_pkt;
  pwm_decoder u_dec (.clk, .rst_n, .line(s_tx), .rise(r_rise), .sym_valid(r_sv), .sym(r_sym),
                     .los(r_los));
  pps_detector u_det (.clk, .rst_n, .sym_valid(r_sv), .sym(r_sym), .marker(r_mark));
  packet_rx u_rx (.clk, .rst_n, .rise(r_rise), .sym_valid(r_sv), .sym(r_sym), .marker(r_mark),
                  .los(r_los), .aligned(r_al), .pkt(r_pkt), .pkt_valid(r_pv), .crc_err(r_ce),
                  .pps_valid(r_ppv), .pps_crc_ok(r_pok), .pps_edge(r_pe));

  int n_rx = 0, n_ret = 0, n_ret_bad = 0, n_status = 0;
  pps_pkt_t ret;
  logic [127:0] last_status = '0;
  assign ret = pps_pkt_t'(r_pkt);
  always @(posedge clk) if (rst_n) begin
    if (rx_valid) n_rx++;
    if (r_ppv) begin
      n_ret++;
      if (!r_pok || ret.a != own) n_ret_bad++;
    end
    if (r_pv) begin n_status++; last_status <= r_pkt; end
  end

  initial begin
    repeat (40 * SEC) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [127:0] p);
    @(negedge clk); dpkt = p; dv = 1;
    do @(posedge clk); while (!dack);
    #1 dv = 0;
    repeat (2 * 1024) @(negedge clk);
  endtask

  function automatic logic [127:0] mk(input logic [2:0] off, input logic [27:0] a,
                                      input logic [63:0] pl, input logic [15:0] id, input bit fc);
    logic [127:0] p;
    p = '0; p[127] = fc; p[126:124] = off; p[123:96] = a; p[95:32] = pl; p[31:16] = id;
    return p;
  endfunction

  initial begin
    int lag, bad, e0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    repeat (2 * SEC + 200) @(negedge clk);
    chk(synced && ia && own.offset == 2 && own.addr == 28'h3500000 && resyncs == 1,
        "synchronized and addressed from the first 1PPS packet");
    // the Slave's second lags the sender's by the fiber plus the receive pipeline
    lag = (int'(cyc) - int'(ts_cyc) + SEC) % SEC;
    chk(lag > D && lag < D + 12, $sformatf("second follows the 1PPS edge (lag %0d)", lag));
    chk(ts_sec == gps, "GPS second taken from the packet");
    repeat (2 * SEC) @(negedge clk);
    chk(n_ret >= 2 && n_ret_bad == 0 && ret.locked, "return 1PPS packets: own address, CRC, locked");

    // upstream second moves by 100 cycles
    @(negedge clk); up_adv = L'(100);
    e0 = sync_errs;
    repeat (SEC + 200) @(negedge clk);
    chk(sync_errs == e0 + 1 && resyncs == 1 && !dut.locked, "1st mismatch tolerated, not locked");
    repeat (SEC) @(negedge clk);
    chk(sync_errs == e0 + 2 && resyncs == 1, "2nd mismatch tolerated");
    repeat (SEC) @(negedge clk);
    chk(resyncs == 2 && dut.locked, "3rd mismatch re-synchronizes");
    lag = (int'(cyc) + 100 - int'(ts_cyc) + SEC) % SEC;
    chk(lag > D && lag < D + 12, $sformatf("on the moved second (lag %0d)", lag));

    // data packets
    send(mk(3'd2, 28'h3500000, 64'h77, 16'h1, 0));
    chk(n_rx == 1 && rx_pkt[95:32] == 64'h77, "own address absorbed");
    send(mk(3'd2, 28'h3600000, 64'h78, 16'h1, 0));
    send(mk(3'd3, 28'h3510000, 64'h79, 16'h1, 0));
    chk(n_rx == 1 && route_errs == 2, "other slave and deeper level are routing errors");

    // status packet and flow control
    @(negedge clk); st_data = 64'h1111; st_valid = 1;
    do @(posedge clk); while (!st_ready);
    #1 st_valid = 0;
    repeat (3 * 1024) @(negedge clk);
    chk(n_status == 1 && last_status[126:96] == {3'd2, 28'h3500000} &&
        last_status[95:32] == 64'h1111 && last_status[31:16] == 16'h00AA,
        "status packet sent up with the source address");
    send(mk(3'd1, 28'h3000000, 64'h0, FC_PKT_ID, 1));
    chk(tc && !ta, "hold packet: TC set, TA cleared");
    @(negedge clk); st_data = 64'h2222; st_valid = 1; @(negedge clk); st_valid = 0;
    repeat (3 * 1024) @(negedge clk);
    chk(n_status == 1 && !st_ready, "status held");
    send(mk(3'd1, 28'h3000000, 64'h0, FC_PKT_ID, 0));
    repeat (2 * 1024) @(negedge clk);
    chk(!tc && ta && n_status == 2 && last_status[95:32] == 64'h2222, "resume: packet sent");

    // invalid address string
    @(negedge clk); pps_a = '0;
    repeat (SEC + 200) @(negedge clk);
    chk(!ia && !ta && own.offset == 0, "offset 000 clears the address");
    @(negedge clk); pps_a = '{fc: 1'b0, offset: 3'd2, addr: 28'h3500000};
    repeat (SEC + 200) @(negedge clk);
    chk(ia && ta && own.offset == 2, "valid address string restores it");

    // loss of signal
    plugged = 0;
    repeat (300) @(negedge clk);
    chk(!ia && !synced, "loss of signal clears address and sync");
    plugged = 1;
    repeat (2 * SEC) @(negedge clk);
    chk(ia && synced && resyncs == 3, "first 1PPS after the loss re-synchronizes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
