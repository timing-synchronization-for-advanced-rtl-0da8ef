// tb_packet_tx: records the line of a small-second transmitter (4 slots per second) and
// decodes it independently: 1PPS packet in the last slot with marker and CRC, its end at
// channel time 0 (advanced by adv), data packets in other slots, idle slots, and the
// sign-alternation rule everywhere but the marker.
module tb_packet_tx;
  import timing_pkg::*;
  import tb_util_pkg::*;
  localparam int L = 12;
  localparam int N = 3 * (1 << L);
  logic clk = 0, rst_n = 0;
  logic [L-1:0] cyc = '0, adv = '0;
  logic pps_en = 1, data_valid = 0, data_ack, ch_sec, line;
  logic [127:0] pps_pkt, data_pkt;
  int checks = 0, failures = 0;
  bit   wave [N];
  int   acks = 0, chsec_at = -1;

  packet_tx #(.SEC_LOG2(L)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (4 * N) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // decode the recorded line: symbols starting at cycle s, width w
  task automatic analyse(input int a, input logic [127:0] exp_pps, input logic [127:0] exp_data,
                         input int data_slot);
    int s, w, last_sign, ones;
    logic [127:0] slot_bits [4];
    int syms [4][128];
    int marker_ok;
    last_sign = 0;
    for (int k = 0; k < 4; k++) slot_bits[k] = '0;
    for (int c = 1; c < N - 8; c++) begin
      if (wave[c] && !wave[c-1]) begin
        int t, sl, bi;
        w = 0;
        while (wave[c + w]) w++;
        // wave[c] is the line just after the clock edge at channel time c+adv
        t  = (c + a) % (1 << L);
        sl = t / 1024;
        bi = (t % 1024) / 8;
        chk(t % 8 == 0, "rising edge on a bit boundary");
        if (c + a >= (1 << L) && c + a < 2 * (1 << L)) begin  // one whole channel second
          slot_bits[sl][127 - bi] = (w != 4);
          syms[sl][bi] = (w == 6) ? 1 : (w == 2) ? -1 : 0;
          chk(w == 2 || w == 4 || w == 6, "pulse width");
        end
      end
    end
    chk(slot_bits[3] == exp_pps, $sformatf("1PPS slot content %h vs %h", slot_bits[3], exp_pps));
    chk(syms[3][96] == 1 && syms[3][97] == 1 && syms[3][98] == -1 && syms[3][99] == -1, "marker");
    for (int sl = 0; sl < 3; sl++)
      chk(slot_bits[sl] == ((sl == data_slot) ? exp_data : '0), $sformatf("slot %0d content %h exp %h", sl, slot_bits[sl], (sl == data_slot) ? exp_data : 128'h0));
    // alternation: outside the marker, no two equal signs in a row
    for (int sl = 0; sl < 4; sl++)
      for (int bi = 0; bi < 128; bi++)
        if (syms[sl][bi] != 0) begin
          if (!(sl == 3 && bi >= 96 && bi <= 100))
            chk(syms[sl][bi] != last_sign, $sformatf("alternation slot %0d bit %0d", sl, bi));
          last_sign = syms[sl][bi];
        end
  endtask

  initial begin
    logic [127:0] pp, d;
    pp = {$urandom, $urandom, $urandom, $urandom};
    d  = {$urandom, $urandom, $urandom, $urandom};
    pps_pkt = pp; data_pkt = d;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int a = 0; a < 2; a++) begin
      int ack_slot;
      adv = (a == 0) ? '0 : L'(100);
      cyc = '0;
      acks = 0; ack_slot = -1; chsec_at = -1;
      data_valid = 1;
      for (int c = 0; c < N; c++) begin
        @(negedge clk);
        if (data_ack) begin
          acks++;
          if (c + int'(adv) >= (1 << L) && ack_slot < 0) ack_slot = ((c + int'(adv)) % (1 << L)) / 1024;
        end
        if (ch_sec && c >= (1 << L) && chsec_at < 0) chsec_at = c;
        begin
          bit took;
          took = data_ack && c + int'(adv) >= (1 << L);
          @(posedge clk);
          #1 wave[c] = line;
          if (took) data_valid = 0;
        end
        cyc = cyc + 1'b1;
      end
      chk(chsec_at == ((adv == 0) ? (1 << L) : 2 * (1 << L) - int'(adv)), $sformatf("ch_sec at %0d", chsec_at));
      chk(ack_slot == 0, "data taken at the first slot of the second");
      pp[31:28] = 4'hF;
      analyse(int'(adv), ref_seal(pp), ref_seal(d), 0);
      data_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
