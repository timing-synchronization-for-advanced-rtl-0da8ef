// fiber: behavioural model of an optical fiber link for the testbenches: the line value
// delayed by D clock cycles; when unplugged the far end sees a dark (0) line.
module fiber #(
  parameter int D = 10
) (
  input  logic clk,
  input  logic plugged,
  input  logic tx,
  output logic rx
);
  logic [D-1:0] sr = '0;
  always_ff @(posedge clk) sr <= {sr[D-2:0], tx && plugged};
  assign rx = sr[D-1];
endmodule
