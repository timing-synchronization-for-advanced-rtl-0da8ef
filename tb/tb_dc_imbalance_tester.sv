// tb_dc_imbalance_tester: runs the unbalanced-line-code test through a model fiber.
//
// The tester's line goes through a 57-cycle fiber and back into its own receiver. Run 1
// (clean fiber): every symbol must return, err must stay low, no short pulse may ever be
// sent, and the 128 bytes on the serial monitor output, decoded here by a reference
// receiver, must equal the LFSR string computed independently in this bench. The sending
// phase must last 8 cycles per bit. Run 2: the fiber is unplugged part-way, so symbols are
// lost and err must rise. Run 3: a bit is flipped on the line (one pulse cut to 2 of 8
// cycles), err must rise with err_cnt = 1. The serial link runs at 4 cycles per bit.
module tb_dc_imbalance_tester;
  import timing_pkg::*;
  localparam int NBITS = 1024, DIV = 4, D = 57;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  logic start = 0, plugged = 0, flip = 0;   // unplugged until reset is over
  logic tx_line, rx_line, f_rx, txd, busy, done, err;
  logic [15:0] err_cnt;

  dc_imbalance_tester #(.NBITS(NBITS), .DIV(DIV)) dut (
    .clk, .rst_n, .start, .tx_line, .rx_line, .txd, .busy, .done, .err, .err_cnt);
  fiber #(.D(D)) u_f (.clk, .plugged, .tx(tx_line), .rx(f_rx));

  // flip: cut one pulse to 2 high cycles on the way (a -1, never sent by the tester)
  int hi_run = 0;
  always_ff @(posedge clk) hi_run <= f_rx ? hi_run + 1 : 0;
  assign rx_line = f_rx && !(flip && hi_run >= 2);

  // reference bit string
  bit ref_bits [NBITS];
  initial begin
    logic [15:0] v = 16'hACE1;
    for (int i = 0; i < NBITS; i++) begin
      ref_bits[i] = v[15];
      v = {v[14:0], v[15] ^ v[13] ^ v[12] ^ v[10]};
    end
  end

  // transmitted pulse widths: never 2 of 8
  int run_tx = 0, short_pulses = 0, long_pulses = 0;
  always_ff @(posedge clk) begin
    run_tx <= tx_line ? run_tx + 1 : 0;
    if (!tx_line && run_tx == 2) short_pulses <= short_pulses + 1;
    if (!tx_line && run_tx == 6) long_pulses <= long_pulses + 1;
  end

  // reference serial receiver
  byte rx_bytes[$];
  initial begin
    forever begin
      byte b;
      @(negedge txd);
      repeat (DIV / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (DIV) @(posedge clk);
        b[i] = txd;
      end
      repeat (DIV) @(posedge clk);
      rx_bytes.push_back(b);
    end
  end

  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(output int t_send);
    int t0;
    @(posedge clk); #1 start = 1; @(posedge clk); #1 start = 0;
    t0 = cyc;
    wait (dut.tx_cnt == NBITS);
    t_send = cyc - t0;
    wait (done);
    repeat (5 * DIV) @(posedge clk);
  endtask

  initial begin
    int ts, mism;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    plugged = 1;
    // run 1: clean
    run(ts);
    chk(!err && err_cnt == 0, $sformatf("clean run flagged an error: %0d", err_cnt));
    chk(ts >= 8 * NBITS - 8 && ts <= 8 * NBITS + 8, $sformatf("send time %0d cycles", ts));
    chk(short_pulses == 0, "short pulse sent");
    chk(long_pulses > NBITS / 4, $sformatf("only %0d long pulses", long_pulses));
    chk(rx_bytes.size() == NBITS / 8, $sformatf("%0d bytes dumped", rx_bytes.size()));
    mism = 0;
    for (int i = 0; i < rx_bytes.size() * 8 && i < NBITS; i++)
      if (rx_bytes[i / 8][7 - i % 8] != ref_bits[i]) mism++;
    chk(mism == 0, $sformatf("%0d dumped bits differ", mism));
    // run 2: unplugged part-way
    rx_bytes.delete();
    fork
      begin repeat (4000) @(posedge clk); plugged = 0; end
      run(ts);
    join
    plugged = 1;
    chk(err && err_cnt > 0, "lost symbols not flagged");
    chk(rx_bytes.size() == NBITS / 8, "dump after a failed run");
    // run 3: one pulse corrupted
    fork
      begin
        wait (busy);
        repeat (2000) @(posedge clk);
        @(posedge f_rx);
        #1 flip = 1;
        repeat (8) @(posedge clk);
        #1 flip = 0;
      end
      run(ts);
    join
    chk(err && err_cnt == 1, $sformatf("one corrupted pulse: err=%0b err_cnt=%0d", err, err_cnt));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
