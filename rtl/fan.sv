// fan: N-bit ripple-carry adder with no carry input, s = x + y and cout the
// carry out of the top bit. Built as in the original design from a half
// adder for bit 0 and N-1 full adders chained by their carries.
// Combinational; N must be at least 2.
module fan #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] s,
  output logic         cout
);
  logic [N-1:0] c;
  hadder u_a0 (.x(x[0]), .y(y[0]), .s(s[0]), .c(c[0]));
  for (genvar i = 1; i < N; i++) begin : g_bit
    fa1 u_ai (.x(x[i]), .y(y[i]), .z(c[i-1]), .s(s[i]), .c(c[i]));
  end
  assign cout = c[N-1];
endmodule
