// tb_packet_rx: feeds symbol streams and checks framing by the 1PPS marker, packet
// delivery, CRC rejection, idle slots, the second-start edge and loss of framing.
module tb_packet_rx;
  import timing_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0, rise = 0, sym_valid = 0, marker = 0, los = 0;
  sym_t sym = SYM_ZERO;
  logic aligned, pkt_valid, crc_err, pps_valid, pps_crc_ok, pps_edge;
  logic [127:0] pkt;
  int checks = 0, failures = 0;
  int n_pkt = 0, n_err = 0, n_pps = 0, n_edge = 0;
  logic [127:0] exp_pkt[$];
  int edge_cycle, exp_edge_cycle, cycle = 0;
  bit pos = 0;

  packet_rx dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int last_rise = -10;
  always @(posedge clk) begin
    cycle++;
    if (rst_n && rise) last_rise = cycle;
    if (rst_n && pps_edge) chk(cycle == last_rise + 1, "edge one cycle after the first rise");
    if (rst_n && pkt_valid) begin
      n_pkt++;
      chk(exp_pkt.size() > 0 && pkt == exp_pkt[0], "data packet content");
      if (exp_pkt.size() > 0) void'(exp_pkt.pop_front());
    end
    if (rst_n && crc_err) n_err++;
    if (rst_n && pps_valid) n_pps++;
    if (rst_n && pps_edge) begin n_edge++; edge_cycle = cycle; end
  end

  // one bit: rising edge, then the symbol at the falling edge
  task automatic send_bit(input bit b, input bit mk_force, input sym_t mk_sym, input bit mk);
    @(negedge clk); rise = 1;
    @(negedge clk); rise = 0;
    repeat (2) @(negedge clk);
    sym_valid = 1;
    if (mk_force) sym = mk_sym;
    else if (b) begin pos = !pos; sym = pos ? SYM_POS : SYM_NEG; end
    else sym = SYM_ZERO;
    marker = mk;
    @(negedge clk); sym_valid = 0; marker = 0;
    repeat (3) @(negedge clk);
  endtask

  task automatic send_slot(input logic [127:0] p, input bit is_pps);
    for (int i = 127; i >= 0; i--) begin
      if (is_pps && i <= 31 && i >= 28)
        send_bit(1, 1, (i >= 30) ? SYM_POS : SYM_NEG, i == 28);
      else
        send_bit(p[i], 0, SYM_ZERO, 0);
    end
    if (is_pps) pos = 0;
  endtask

  function automatic logic [127:0] rnd_pkt();
    logic [127:0] p;
    p = {$urandom, $urandom, $urandom, $urandom};
    p[126:124] = 3'd2;
    return ref_seal(p);
  endfunction

  initial begin
    logic [127:0] pp, d1, d2, bad;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    // unframed noise: nothing may come out
    for (int i = 0; i < 77; i++) send_bit(1'($urandom), 0, SYM_ZERO, 0);
    chk(n_pkt == 0 && n_err == 0 && !aligned, "nothing before the marker");
    pp = {$urandom, $urandom, $urandom, $urandom};
    pp[31:28] = 4'hF;
    pp = ref_seal(pp);
    send_slot(pp, 1);
    repeat (4) @(negedge clk);
    chk(n_pps == 1 && pps_crc_ok && pkt == pp, "1PPS packet received");
    chk(aligned, "aligned after marker");
    exp_edge_cycle = cycle + 2;         // next rise is driven on the next negedge
    d1 = rnd_pkt();
    exp_pkt.push_back(d1);
    send_slot(d1, 0);
    chk(n_edge == 1, "one second-start edge");
    chk(edge_cycle - exp_edge_cycle >= 0 && edge_cycle - exp_edge_cycle <= 1,
        $sformatf("edge at the first rise after the 1PPS packet (%0d vs %0d)", edge_cycle, exp_edge_cycle));
    send_slot('0, 0);                  // idle slot
    bad = rnd_pkt();
    bad[70] = !bad[70];
    send_slot(bad, 0);
    d2 = rnd_pkt();
    exp_pkt.push_back(d2);
    send_slot(d2, 0);
    repeat (4) @(negedge clk);
    chk(n_pkt == 2, $sformatf("two good packets (%0d)", n_pkt));
    chk(n_err == 1, "one CRC error");
    chk(exp_pkt.size() == 0, "all packets delivered");
    // loss of signal drops the framing
    @(negedge clk); los = 1; @(negedge clk); los = 0;
    chk(!aligned, "framing lost");
    send_slot(rnd_pkt(), 0);
    chk(n_pkt == 2 && n_err == 1, "no packets without framing");
    // a second 1PPS packet with a bad CRC still gives the edge
    pp[100] = !pp[100];
    send_slot(pp, 1);
    send_bit(0, 0, SYM_ZERO, 0);
    chk(n_pps == 2 && !pps_crc_ok && n_edge == 2, "bad 1PPS packet flagged, edge kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
