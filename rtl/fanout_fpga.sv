// fanout_fpga: logic of a Master-Fanout (MFO) or Fanout board.
//
// One design serves both roles. A board whose GPS and reference-clock inputs are both
// present (gps_ok, refclk_ok) is the master: its second starts at the external 1PPS edge,
// its GPS second comes from the GPS receiver's serial message (9600-baud reader, "@@Ha"
// parser, UTC-to-GPS conversion), its address is offset 000, and the packets it collects
// are streamed to the PC over RS422. Any other board is a Fanout: it takes second, GPS
// second and address from the 1PPS packets of its uplink, returns a 1PPS packet upstream
// once synchronized, and forwards collected packets up its uplink while transfer is
// allowed (TA).
//
// Every second each of the NP fanout channels sends a 1PPS packet carrying the GPS second
// about to begin and the address string of that port, advanced by the port's measured
// fiber delay. Downstream data packets (from the uplink, or host_* on the master) are
// routed by the address engine: absorbed here (local_*), forwarded to one port, or counted
// as routing errors. Upstream packets from all ports are gathered into one FIFO; when it
// passes 75% or falls under 25% full, a flow-control packet goes down every port so that
// the units below hold or resume.
//
// Time stamp: ts_sec (GPS second) and ts_cyc (2^26 Hz cycle within it).
module fanout_fpga
  import timing_pkg::*;
#(
  parameter int SEC_LOG2     = 26,     // 2^26 Hz oscillator
  parameter int NP           = 16,     // fanout channels
  parameter int FIFO_DEPTH   = 64,
  parameter int UART_DIV     = 6991,   // 9600 baud
  parameter int LOS_CYC      = 64,
  parameter int MAX_SYNC_ERR = 2,
  parameter int DELAY_TOL    = 67,     // 1 us
  parameter int DELAY_REPEAT = 4,
  parameter int LEAP         = 14
) (
  input  logic                         clk,        // 2^26 Hz VCO
  input  logic                         rst_n,
  // master-only inputs
  input  logic                         gps_ok,     // GPS receiver connected
  input  logic                         refclk_ok,  // reference oscillator connected
  input  logic                         ext_pps,    // 1PPS from GPS receiver or BNC
  input  logic                         gps_rxd,    // GPS receiver serial data
  output logic                         pc_txd,     // RS422 to the PC
  input  logic                         host_valid, // packet from the PC side to send down
  input  logic [127:0]                 host_pkt,
  output logic                         host_ready,
  // fibers
  input  logic                         up_rx,
  output logic                         up_tx,
  input  logic [NP-1:0]                fo_rx,
  output logic [NP-1:0]                fo_tx,
  // local data and status
  output logic                         local_valid,
  output logic [127:0]                 local_pkt,
  output logic                         is_mfo,
  output addr_t                        own_addr,
  output logic                         ia,
  output logic                         ta,
  output logic                         tc,
  output logic                         synced,
  output logic [31:0]                  ts_sec,
  output logic [SEC_LOG2-1:0]          ts_cyc,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count,
  output logic [NP-1:0]                chan_up,
  output logic [NP-1:0][SEC_LOG2-1:0]  chan_adv,
  output logic [15:0]                  route_errs,
  output logic [15:0]                  drops,
  output logic [15:0]                  sync_errs
);
  assign is_mfo = gps_ok && refclk_ok;

  // ---------------- time base and synchronization
  logic tb_load, sec_pulse, bit_start_u, slot_start_u, sec_start;
  logic [SEC_LOG2-1:0] cyc;
  timebase #(.SEC_LOG2(SEC_LOG2)) u_tb (
    .clk, .rst_n, .load(tb_load), .cyc, .sec_pulse, .bit_start(bit_start_u),
    .slot_start(slot_start_u)
  );
  assign ts_cyc    = cyc;
  assign sec_start = sec_pulse || tb_load;

  logic [2:0] pps_sync;
  logic       ext_rise;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) pps_sync <= '0;
    else        pps_sync <= {pps_sync[1:0], ext_pps};
  assign ext_rise = pps_sync[1] && !pps_sync[2];

  // uplink receiver
  logic up_rise, up_sym_valid, up_los, up_marker, up_aligned;
  logic up_pkt_valid, up_crc_err, up_pps_valid, up_pps_ok, up_pps_edge;
  sym_t up_sym;
  logic [127:0] up_pkt;
  pwm_decoder #(.LOS_CYC(LOS_CYC)) u_up_dec (
    .clk, .rst_n, .line(up_rx), .rise(up_rise), .sym_valid(up_sym_valid), .sym(up_sym),
    .los(up_los)
  );
  pps_detector u_up_det (.clk, .rst_n, .sym_valid(up_sym_valid), .sym(up_sym),
                         .marker(up_marker));
  packet_rx u_up_rx (
    .clk, .rst_n, .rise(up_rise), .sym_valid(up_sym_valid), .sym(up_sym), .marker(up_marker),
    .los(up_los), .aligned(up_aligned), .pkt(up_pkt), .pkt_valid(up_pkt_valid),
    .crc_err(up_crc_err), .pps_valid(up_pps_valid), .pps_crc_ok(up_pps_ok),
    .pps_edge(up_pps_edge)
  );

  logic sync_err, locked;
  logic [7:0] resyncs;
  sync_verifier #(.MAX_ERR(MAX_SYNC_ERR)) u_sv (
    .clk, .rst_n,
    .ref_edge (is_mfo ? ext_rise : up_pps_edge),
    .sec_pulse,
    .los      (!is_mfo && up_los),
    .load     (tb_load),
    .synced, .sync_err, .locked, .resyncs
  );

  // 1PPS packets go out once the board has been synchronized; after a loss of the uplink
  // the board keeps its own second (holdover) and keeps sending, with an invalid address,
  // so the units below learn of the loss. After each (re)alignment the fiber-delay
  // measurements pause for two second boundaries: until the units below have seen one 1PPS
  // edge of the new alignment, their return 1PPS packets are still timed by the old one
  // and report them as locked (the report is taken one slot before the packet's end).
  logic [1:0] since_load;
  logic       pps_on, meas_on;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)       pps_on <= 1'b0;
    else if (tb_load) pps_on <= 1'b1;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                               since_load <= 2'd0;
    else if (tb_load)                         since_load <= 2'd2;
    else if (sec_pulse && since_load != 2'd0) since_load <= since_load - 2'd1;
  assign meas_on = since_load == 2'd0;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                             sync_errs <= '0;
    else if (sync_err && sync_errs != '1)  sync_errs <= sync_errs + 1'b1;

  // ---------------- GPS second
  logic [7:0] gb, g_mon, g_day, g_yr, g_hr, g_min, g_sec;
  logic gb_valid, gb_ferr, g_valid, conv_valid;
  logic [31:0] conv_sec;
  uart_rx #(.DIV(UART_DIV)) u_gps_uart (
    .clk, .rst_n, .rxd(gps_rxd), .data(gb), .valid(gb_valid), .frame_err(gb_ferr)
  );
  gps_ha_parser u_ha (
    .clk, .rst_n, .rx_data(gb), .rx_valid(gb_valid), .month(g_mon), .day(g_day),
    .year_lo(g_yr), .hour(g_hr), .minute(g_min), .second(g_sec), .valid(g_valid)
  );
  utc_to_gps #(.LEAP(LEAP)) u_utc (
    .clk, .rst_n, .in_valid(g_valid), .month(g_mon), .day(g_day), .year_lo(g_yr),
    .hour(g_hr), .minute(g_min), .second(g_sec), .gps_sec(conv_sec), .valid(conv_valid)
  );

  logic [31:0] pend_sec;
  logic        pend;
  pps_pkt_t    up_pps;
  assign up_pps = pps_pkt_t'(up_pkt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ts_sec <= '0; pend_sec <= '0; pend <= 1'b0;
    end else begin
      if (!is_mfo && up_pps_valid && up_pps_ok) begin
        pend_sec <= up_pps.gps_sec;
        pend     <= 1'b1;
      end
      if (is_mfo && conv_valid) begin
        ts_sec <= conv_sec;                 // the message describes the current second
      end else if (sec_start) begin
        ts_sec <= pend ? pend_sec : ts_sec + 1'b1;
        pend   <= 1'b0;
      end
    end
  end

  // ---------------- addressing and routing
  addr_t [NP-1:0] port_addr;
  addr_t  q;
  logic   r_absorb, r_forward, r_error, addr_err;
  logic [3:0] r_port;
  logic   up_is_fc, up_route, rt_valid;
  logic [127:0] rt_pkt;
  logic [NP-1:0] ch_full;     // port buffer occupied
  logic [15:0]   ch_full16;
  assign ch_full16 = 16'(ch_full);

  addr_engine #(.NP(NP), .IS_SLAVE(1'b0)) u_addr (
    .clk, .rst_n, .is_mfo, .up_los,
    .pps_valid (up_pps_valid && up_pps_ok),
    .pps_addr  (up_pps.a),
    .own       (own_addr), .ia, .addr_err, .port_addr,
    .q, .r_absorb, .r_forward, .r_port, .r_error
  );

  data_pkt_t up_dp, rt_dp;
  assign up_dp      = data_pkt_t'(up_pkt);
  assign rt_dp      = data_pkt_t'(rt_pkt);
  assign up_is_fc   = (up_dp.id == FC_PKT_ID);
  assign up_route   = up_pkt_valid && !up_is_fc;
  // a host packet waits while the uplink uses the router or its port buffer is occupied
  assign host_ready = !up_route && !(r_forward && ch_full16[r_port]);
  assign rt_valid   = up_route || (host_valid && host_ready);
  assign rt_pkt     = up_route ? up_pkt : host_pkt;
  assign q          = rt_dp.a;

  assign local_valid = rt_valid && r_absorb;
  assign local_pkt   = rt_pkt;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) route_errs <= '0;
    else if (rt_valid && r_error && route_errs != '1) route_errs <= route_errs + 1'b1;

  // ---------------- upstream buffering and flow control
  logic fifo_push, fifo_pop, fifo_empty, fifo_full, fifo_af, fifo_ae, fifo_ovf;
  logic [127:0] fifo_wdata, fifo_rdata;
  logic fc_req, fc_val;

  flow_ctrl u_fc (
    .clk, .rst_n, .addr_valid(ia), .up_los(!is_mfo && up_los),
    .up_pkt_valid(!is_mfo && up_pkt_valid), .up_pkt_fc(up_pkt[127]),
    .fifo_af, .fifo_ae, .tc, .ta, .fc_req, .fc_val
  );

  logic [NP-1:0]        ch_up_valid, ch_crc_err, ch_drop, ch_meas, ch_adj;
  logic [NP-1:0][127:0] ch_up_pkt;
  logic [NP-1:0][SEC_LOG2-1:0] ch_rtt;

  data_manager #(.N(NP)) u_dm (
    .clk, .rst_n, .in_valid(ch_up_valid), .in_pkt(ch_up_pkt), .fifo_full,
    .push(fifo_push), .push_data(fifo_wdata), .drops
  );

  sync_fifo #(.WIDTH(128), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .push(fifo_push), .wdata(fifo_wdata), .pop(fifo_pop), .rdata(fifo_rdata),
    .empty(fifo_empty), .full(fifo_full), .af(fifo_af), .ae(fifo_ae), .count(fifo_count),
    .overflow(fifo_ovf)
  );

  // master: FIFO to the PC; fanout: FIFO up the uplink while TA allows
  logic pc_pop, pc_busy, up_ack, up_ch_sec;
  pc_serial_out #(.DIV(UART_DIV)) u_pc (
    .clk, .rst_n, .fifo_empty(fifo_empty || !is_mfo), .fifo_data(fifo_rdata),
    .fifo_pop(pc_pop), .txd(pc_txd), .busy(pc_busy)
  );

  pps_pkt_t ret_pps;
  always_comb begin
    ret_pps         = '0;
    ret_pps.a       = own_addr;
    ret_pps.gps_sec = ts_sec + 1'b1;
    ret_pps.locked  = locked;
  end

  // the board above frames this uplink from the return 1PPS packet: data waits for one
  logic up_framed;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)         up_framed <= 1'b0;
    else if (!synced)   up_framed <= 1'b0;
    else if (up_ch_sec) up_framed <= 1'b1;

  packet_tx #(.SEC_LOG2(SEC_LOG2)) u_up_tx (
    .clk, .rst_n, .cyc, .adv('0),
    .pps_en     (!is_mfo && synced),
    .pps_pkt    (ret_pps),
    .data_valid (!is_mfo && ta && up_framed && !fifo_empty),
    .data_pkt   (fifo_rdata),
    .data_ack   (up_ack),
    .ch_sec     (up_ch_sec),
    .line       (up_tx)
  );

  assign fifo_pop = is_mfo ? pc_pop : up_ack;

  // ---------------- fanout channels
  for (genvar p = 0; p < NP; p++) begin : g_ch
    pps_pkt_t pp;
    always_comb begin
      pp         = '0;
      pp.a       = port_addr[p];
      pp.gps_sec = ts_sec + 1'b1;
    end
    fanout_channel #(.SEC_LOG2(SEC_LOG2), .LOS_CYC(LOS_CYC), .DELAY_TOL(DELAY_TOL),
                     .DELAY_REPEAT(DELAY_REPEAT)) u_ch (
      .clk, .rst_n, .cyc, .pps_en(pps_on), .meas_en(meas_on), .pps_pkt(pp), .fc_req, .fc_val, .own(own_addr),
      .down_valid (rt_valid && r_forward && r_port == 4'(p)),
      .down_pkt   (rt_pkt),
      .down_drop  (ch_drop[p]),
      .down_full  (ch_full[p]),
      .rx_line    (fo_rx[p]),
      .tx_line    (fo_tx[p]),
      .up_valid   (ch_up_valid[p]),
      .up_pkt     (ch_up_pkt[p]),
      .crc_err    (ch_crc_err[p]),
      .link_up    (chan_up[p]),
      .adv        (chan_adv[p]),
      .rtt        (ch_rtt[p]),
      .meas_valid (ch_meas[p]),
      .adjusted   (ch_adj[p])
    );
  end
endmodule
