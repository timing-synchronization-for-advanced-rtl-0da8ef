// tb_timebase: checks the second counter, its strobes and re-synchronization.
module tb_timebase;
  localparam int L = 12;
  logic clk = 0, rst_n = 0, load = 0;
  logic [L-1:0] cyc;
  logic sec_pulse, bit_start, slot_start;
  int checks = 0, failures = 0;
  int model;

  timebase #(.SEC_LOG2(L)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int secs = 0, slots = 0, bits = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    model = 1;
    for (int i = 0; i < 3 * (1 << L); i++) begin
      @(negedge clk);
      chk(cyc == L'(model), $sformatf("count %0d model %0d i %0d", cyc, model, i));
      chk(sec_pulse == (model == 0), "sec pulse");
      chk(bit_start == (model % 8 == 0), "bit start");
      chk(slot_start == (model % 1024 == 0), "slot start");
      secs  += sec_pulse;
      slots += slot_start;
      bits  += bit_start;
      model = (model + 1) % (1 << L);
    end
    chk(secs == 3, "3 seconds");
    chk(slots == 3 * (1 << L) / 1024, "slots per second");
    chk(bits == 3 * (1 << L) / 8, "bits per second");
    // re-synchronize in the middle of a second
    repeat (123) @(negedge clk);
    load = 1;
    @(negedge clk);
    load = 0;
    chk(cyc == 1, "load makes next count 1");
    repeat ((1 << L) - 1) @(negedge clk);
    chk(sec_pulse == 1 && cyc == 0, "second after load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
