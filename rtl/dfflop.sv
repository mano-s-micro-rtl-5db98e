// dfflop: positive-edge D flip-flop, the storage primitive of every register
// and flag in the computer. No reset, as in the original design: registers
// built from it are cleared through their clear/K inputs.
module dfflop (
  input  logic d,
  input  logic clk,
  output logic q
);
  always_ff @(posedge clk) q <= d;
endmodule
