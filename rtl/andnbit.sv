// andnbit: N-bit bitwise AND, s[i] = x[i] & y[i], built as in the original
// design from N and1bit cells. Combinational.
module andnbit #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] s
);
  for (genvar i = 0; i < N; i++) begin : g_bit
    and1bit u_and (.x(x[i]), .y(y[i]), .z(s[i]));
  end
endmodule
