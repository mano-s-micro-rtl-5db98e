// jkfflop: JK flip-flop built, as in the original design, from a D flip-flop
// whose next state is J&~Q | ~K&Q: J sets, K clears, J and K together toggle,
// neither holds. Updates on the rising clock edge. Used for the flags
// R, IEN, FGI, FGO and as the bit cell of every register.
module jkfflop (
  input  logic j,
  input  logic k,
  input  logic clk,
  output logic q,
  output logic qbar
);
  logic ds;
  assign ds   = (j & ~q) | (~k & q);
  assign qbar = ~q;
  dfflop u_ff (.d(ds), .clk(clk), .q(q));
endmodule
