// slave_fpga: logic of a Slave board, an endpoint of the timing network.
//
// The Slave has one fiber link, its uplink. From it the board recovers the second (the end
// of each 1PPS packet), its GPS second and its address; the sync verifier re-aligns the
// local 2^26 Hz counter on the first 1PPS after boot or after a loss of the uplink, and
// again only after more than MAX_SYNC_ERR consecutive mismatching 1PPS edges. Once
// synchronized it returns a 1PPS packet at each of its own second boundaries, which lets
// the board above measure the fiber delay and advance its 1PPS for this Slave.
//
// Data: status words from the attached equipment (status_*) are packed behind the Slave's
// own 32-bit source address into 128-bit packets and sent up in the next free time slot
// while transfer is allowed (TA: address valid and no hold request from above) and once a
// return 1PPS packet has gone out since synchronization (the board above finds packet
// boundaries from it). Packets
// from above addressed to this Slave come out on rx_*; misaddressed ones are counted.
// Time stamp: ts_sec (GPS second) and ts_cyc (cycle within it).
module slave_fpga
  import timing_pkg::*;
#(
  parameter int SEC_LOG2     = 26,
  parameter int LOS_CYC      = 64,
  parameter int MAX_SYNC_ERR = 2
) (
  input  logic                clk,           // 2^26 Hz VCO
  input  logic                rst_n,
  input  logic                up_rx,
  output logic                up_tx,
  input  logic                status_valid,
  input  logic [63:0]         status_data,
  input  logic [15:0]         status_id,
  output logic                status_ready,  // holding register free
  output logic                rx_valid,
  output logic [127:0]        rx_pkt,
  output addr_t               own_addr,
  output logic                ia,
  output logic                ta,
  output logic                tc,
  output logic                synced,
  output logic [31:0]         ts_sec,
  output logic [SEC_LOG2-1:0] ts_cyc,
  output logic [15:0]         route_errs,
  output logic [15:0]         sync_errs,
  output logic [7:0]          resyncs
);
  logic tb_load, sec_pulse, bs_u, ss_u, sec_start;
  timebase #(.SEC_LOG2(SEC_LOG2)) u_tb (
    .clk, .rst_n, .load(tb_load), .cyc(ts_cyc), .sec_pulse, .bit_start(bs_u),
    .slot_start(ss_u)
  );
  assign sec_start = sec_pulse || tb_load;

  // uplink receiver
  logic rise, sym_valid, los, marker, aligned, pkt_valid, crc_err, pps_valid, pps_ok, pps_edge;
  sym_t sym;
  logic [127:0] pkt;
  pwm_decoder #(.LOS_CYC(LOS_CYC)) u_dec (
    .clk, .rst_n, .line(up_rx), .rise, .sym_valid, .sym, .los
  );
  pps_detector u_det (.clk, .rst_n, .sym_valid, .sym, .marker);
  packet_rx u_rx (
    .clk, .rst_n, .rise, .sym_valid, .sym, .marker, .los, .aligned, .pkt, .pkt_valid,
    .crc_err, .pps_valid, .pps_crc_ok(pps_ok), .pps_edge
  );

  logic sync_err, locked;
  sync_verifier #(.MAX_ERR(MAX_SYNC_ERR)) u_sv (
    .clk, .rst_n, .ref_edge(pps_edge), .sec_pulse, .los, .load(tb_load), .synced, .sync_err,
    .locked, .resyncs
  );
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                            sync_errs <= '0;
    else if (sync_err && sync_errs != '1) sync_errs <= sync_errs + 1'b1;

  // GPS second from the 1PPS packets
  pps_pkt_t  pp;
  data_pkt_t dp;
  logic [31:0] pend_sec;
  logic        pend;
  assign pp = pps_pkt_t'(pkt);
  assign dp = data_pkt_t'(pkt);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ts_sec <= '0; pend_sec <= '0; pend <= 1'b0;
    end else begin
      if (pps_valid && pps_ok) begin
        pend_sec <= pp.gps_sec;
        pend     <= 1'b1;
      end
      if (sec_start) begin
        ts_sec <= pend ? pend_sec : ts_sec + 1'b1;
        pend   <= 1'b0;
      end
    end
  end

  // address and routing
  addr_t [0:0] port_unused;
  logic r_absorb, r_forward, r_error, addr_err, is_fc;
  logic [3:0] r_port;
  addr_engine #(.NP(1), .IS_SLAVE(1'b1)) u_addr (
    .clk, .rst_n, .is_mfo(1'b0), .up_los(los), .pps_valid(pps_valid && pps_ok),
    .pps_addr(pp.a), .own(own_addr), .ia, .addr_err, .port_addr(port_unused),
    .q(dp.a), .r_absorb, .r_forward, .r_port, .r_error
  );
  assign is_fc    = (dp.id == FC_PKT_ID);
  assign rx_valid = pkt_valid && !is_fc && r_absorb;
  assign rx_pkt   = pkt;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) route_errs <= '0;
    else if (pkt_valid && !is_fc && r_error && route_errs != '1) route_errs <= route_errs + 1'b1;

  logic fc_req_u, fc_val_u;
  flow_ctrl u_fc (
    .clk, .rst_n, .addr_valid(ia), .up_los(los), .up_pkt_valid(pkt_valid),
    .up_pkt_fc(pkt[127]), .fifo_af(1'b0), .fifo_ae(1'b0), .tc, .ta,
    .fc_req(fc_req_u), .fc_val(fc_val_u)
  );

  // status packet holding register and uplink transmitter
  logic        held, ack, ch_sec_u;
  logic [63:0] st_data;
  logic [15:0] st_id;
  pps_pkt_t  ret;
  assign status_ready = !held;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held <= 1'b0; st_data <= '0; st_id <= '0;
    end else begin
      if (ack) held <= 1'b0;
      if (status_valid && !held) begin
        held       <= 1'b1;
        st_data    <= status_data;
        st_id      <= status_id;
      end
    end
  end

  data_pkt_t st_out;
  always_comb begin
    st_out         = '0;
    st_out.a       = '{fc: 1'b0, offset: own_addr.offset, addr: own_addr.addr};
    st_out.payload = st_data;
    st_out.id      = st_id;
    ret         = '0;
    ret.a       = own_addr;
    ret.gps_sec = ts_sec + 1'b1;
    ret.locked  = locked;
  end

  // The receiver above finds packet boundaries from the return 1PPS packet, so data
  // packets wait until one has gone out since synchronization.
  logic framed;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                framed <= 1'b0;
    else if (!synced)          framed <= 1'b0;
    else if (ch_sec_u)         framed <= 1'b1;

  packet_tx #(.SEC_LOG2(SEC_LOG2)) u_tx (
    .clk, .rst_n, .cyc(ts_cyc), .adv('0), .pps_en(synced), .pps_pkt(ret),
    .data_valid(held && ta && framed), .data_pkt(st_out), .data_ack(ack), .ch_sec(ch_sec_u),
    .line(up_tx)
  );
endmodule
