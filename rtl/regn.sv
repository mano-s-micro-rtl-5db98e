// regn: N-bit register with synchronous clear, load and increment, as in the
// original design a chain of N reg1 bit cells whose count carries ripple
// from bit 0 upward. Priority: clr, then load, then inc. cout is the carry
// out of the top bit (high in the cycle where an increment wraps to zero).
// All changes take effect on the rising clock edge.
module regn #(
  parameter int unsigned N = 16
) (
  input  logic         inc,
  input  logic [N-1:0] data,
  input  logic         clr,
  input  logic         load,
  input  logic         clk,
  output logic [N-1:0] q,
  output logic [N-1:0] qbar,
  output logic         cout
);
  logic [N:0] carry;
  logic       ld;

  assign carry[0] = inc & ~load & ~clr;
  assign ld       = load & ~clr;
  assign cout     = carry[N];

  for (genvar i = 0; i < N; i++) begin : g_bit
    reg1 u_bit (.cin(carry[i]), .data(data[i]), .clr(clr), .ld(ld), .clk(clk),
                .q(q[i]), .qbar(qbar[i]), .cout(carry[i+1]));
  end
endmodule
