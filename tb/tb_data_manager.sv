// tb_data_manager: packets from several channels all reach the FIFO side exactly once,
// a busy buffer drops and counts, and a full FIFO holds the buffers.
module tb_data_manager;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, fifo_full = 0, push;
  logic [N-1:0] in_valid = '0;
  logic [N-1:0][127:0] in_pkt = '0;
  logic [127:0] push_data;
  logic [15:0] drops;
  int checks = 0, failures = 0;
  logic [127:0] sent[$], got[$];

  data_manager #(.N(N)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && push) got.push_back(push_data);

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
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    // all channels at once, several rounds
    for (int r = 0; r < 20; r++) begin
      @(negedge clk);
      for (int c = 0; c < N; c++) begin
        in_valid[c] = 1;
        in_pkt[c]   = {32'(r), 32'(c), $urandom, $urandom};
        sent.push_back(in_pkt[c]);
      end
      @(negedge clk); in_valid = '0;
      repeat (N + 2) @(negedge clk);
    end
    chk(got.size() == sent.size(), $sformatf("all delivered %0d/%0d", got.size(), sent.size()));
    foreach (sent[i]) begin
      bit found = 0;
      foreach (got[j]) if (got[j] == sent[i]) found = 1;
      chk(found, "packet delivered");
    end
    chk(drops == 0, "no drops");
    // full FIFO: buffers hold; a second packet on the same channel is dropped
    fifo_full = 1;
    got.delete();
    @(negedge clk); in_valid[1] = 1; in_pkt[1] = 128'h1111;
    @(negedge clk); in_pkt[1] = 128'h2222;
    @(negedge clk); in_valid = '0;
    repeat (5) @(negedge clk);
    chk(got.size() == 0 && drops == 1, "held while full, second dropped");
    fifo_full = 0;
    repeat (3) @(negedge clk);
    chk(got.size() == 1 && got[0] == 128'h1111, "held packet delivered intact");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
