// ligo_timing_top: the FPGA logic of the timing network's two kinds of board, side by side.
//
// The network is a tree of boards joined by bidirectional fibers: a Master-Fanout at the
// root (GPS receiver, reference clock, PC link), Fanouts as routers, Slaves at the leaves.
// fanout_fpga is the logic of the Master-Fanout and of every Fanout (the role follows from
// whether GPS and reference clock are connected); slave_fpga is the logic of a Slave. The
// boards share no wires: they meet only through fibers, so both sets of board I/O are
// brought out here and a network is built by joining fo_tx/fo_rx of one board to
// up_rx/up_tx of another (through the fiber's delay). All parameters default to the
// document's numbers: a 2^26 Hz clock, 16 fanout ports, 9600-baud serial links.
// The DC-imbalance test circuit, which checks how far a link tolerates unalternated long
// pulses, stands beside them with its own lines and monitor output.
module ligo_timing_top
  import timing_pkg::*;
#(
  parameter int SEC_LOG2   = 26,
  parameter int NP         = 16,
  parameter int FIFO_DEPTH = 64,
  parameter int UART_DIV   = 6991
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // Master-Fanout / Fanout board
  input  logic                         fo_gps_ok,
  input  logic                         fo_refclk_ok,
  input  logic                         fo_ext_pps,
  input  logic                         fo_gps_rxd,
  output logic                         fo_pc_txd,
  input  logic                         fo_host_valid,
  input  logic [127:0]                 fo_host_pkt,
  output logic                         fo_host_ready,
  input  logic                         fo_up_rx,
  output logic                         fo_up_tx,
  input  logic [NP-1:0]                fo_rx,
  output logic [NP-1:0]                fo_tx,
  output logic                         fo_local_valid,
  output logic [127:0]                 fo_local_pkt,
  output logic                         fo_is_mfo,
  output addr_t                        fo_addr,
  output logic                         fo_ia,
  output logic                         fo_ta,
  output logic                         fo_tc,
  output logic                         fo_synced,
  output logic [31:0]                  fo_ts_sec,
  output logic [SEC_LOG2-1:0]          fo_ts_cyc,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] fo_fifo_count,
  output logic [NP-1:0]                fo_chan_up,
  output logic [NP-1:0][SEC_LOG2-1:0]  fo_chan_adv,
  output logic [15:0]                  fo_route_errs,
  output logic [15:0]                  fo_drops,
  output logic [15:0]                  fo_sync_errs,
  // Slave board
  input  logic                         sl_up_rx,
  output logic                         sl_up_tx,
  input  logic                         sl_status_valid,
  input  logic [63:0]                  sl_status_data,
  input  logic [15:0]                  sl_status_id,
  output logic                         sl_status_ready,
  output logic                         sl_rx_valid,
  output logic [127:0]                 sl_rx_pkt,
  output addr_t                        sl_addr,
  output logic                         sl_ia,
  output logic                         sl_ta,
  output logic                         sl_tc,
  output logic                         sl_synced,
  output logic [31:0]                  sl_ts_sec,
  output logic [SEC_LOG2-1:0]          sl_ts_cyc,
  output logic [15:0]                  sl_route_errs,
  output logic [15:0]                  sl_sync_errs,
  output logic [7:0]                   sl_resyncs,
  // DC-imbalance test circuit (its lines go to a spare fanout transmitter/receiver pair)
  input  logic                         dc_start,
  output logic                         dc_tx,
  input  logic                         dc_rx,
  output logic                         dc_txd,     // serial monitor
  output logic                         dc_busy,
  output logic                         dc_done,
  output logic                         dc_err,     // error LED
  output logic [15:0]                  dc_err_cnt
);
  fanout_fpga #(.SEC_LOG2(SEC_LOG2), .NP(NP), .FIFO_DEPTH(FIFO_DEPTH), .UART_DIV(UART_DIV)) u_fo (
    .clk, .rst_n,
    .gps_ok(fo_gps_ok), .refclk_ok(fo_refclk_ok), .ext_pps(fo_ext_pps), .gps_rxd(fo_gps_rxd),
    .pc_txd(fo_pc_txd), .host_valid(fo_host_valid), .host_pkt(fo_host_pkt),
    .host_ready(fo_host_ready), .up_rx(fo_up_rx), .up_tx(fo_up_tx), .fo_rx, .fo_tx,
    .local_valid(fo_local_valid), .local_pkt(fo_local_pkt), .is_mfo(fo_is_mfo),
    .own_addr(fo_addr), .ia(fo_ia), .ta(fo_ta), .tc(fo_tc), .synced(fo_synced),
    .ts_sec(fo_ts_sec), .ts_cyc(fo_ts_cyc), .fifo_count(fo_fifo_count), .chan_up(fo_chan_up),
    .chan_adv(fo_chan_adv), .route_errs(fo_route_errs), .drops(fo_drops),
    .sync_errs(fo_sync_errs)
  );

  slave_fpga #(.SEC_LOG2(SEC_LOG2)) u_sl (
    .clk, .rst_n, .up_rx(sl_up_rx), .up_tx(sl_up_tx), .status_valid(sl_status_valid),
    .status_data(sl_status_data), .status_id(sl_status_id), .status_ready(sl_status_ready),
    .rx_valid(sl_rx_valid), .rx_pkt(sl_rx_pkt), .own_addr(sl_addr), .ia(sl_ia), .ta(sl_ta),
    .tc(sl_tc), .synced(sl_synced), .ts_sec(sl_ts_sec), .ts_cyc(sl_ts_cyc),
    .route_errs(sl_route_errs), .sync_errs(sl_sync_errs), .resyncs(sl_resyncs)
  );

  dc_imbalance_tester #(.DIV(UART_DIV)) u_dc (
    .clk, .rst_n, .start(dc_start), .tx_line(dc_tx), .rx_line(dc_rx), .txd(dc_txd),
    .busy(dc_busy), .done(dc_done), .err(dc_err), .err_cnt(dc_err_cnt)
  );
endmodule
