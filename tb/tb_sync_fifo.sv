// tb_sync_fifo: random pushes and pops against a queue model; flags at 75% / 25%.
module tb_sync_fifo;
  localparam int D = 16;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [127:0] wdata = '0, rdata;
  logic empty, full, af, ae, overflow;
  logic [4:0] count;
  int checks = 0, failures = 0, ovf = 0;
  logic [127:0] model[$];

  sync_fifo #(.WIDTH(128), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int bias;
      bias = (i / 500) % 2 ? 70 : 30;   // alternate filling and draining phases
      @(negedge clk);
      chk(count == model.size(), "count");
      chk(empty == (model.size() == 0) && full == (model.size() == D), "empty/full");
      chk(af == (model.size() * 4 > D * 3), $sformatf("af at %0d", model.size()));
      chk(ae == (model.size() * 4 < D), $sformatf("ae at %0d", model.size()));
      if (model.size() > 0) chk(rdata == model[0], "head");
      push  = ($urandom_range(0, 99) < bias);
      pop   = ($urandom_range(0, 99) < 100 - bias);
      wdata = {$urandom, $urandom, $urandom, $urandom};
      begin
        int pre;
        pre = model.size();
        if (pop && pre > 0) void'(model.pop_front());
        if (push) begin
          if (pre < D) model.push_back(wdata);   // a full FIFO refuses, even when popped
          else ovf++;
        end
      end
    end
    @(negedge clk); push = 0; pop = 0;
    chk(ovf > 0, "overflow exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
