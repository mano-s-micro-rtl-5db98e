// reg16: 16-bit register with synchronous clear, load and increment (priority
// in that order); a regn with N = 16 that brings out only q, as in the
// original design. Used for DR, AC, IR, TR and the output register OTR.
module reg16 (
  input  logic        inc,
  input  logic [15:0] data,
  input  logic        clr,
  input  logic        load,
  input  logic        clk,
  output logic [15:0] q
);
  logic [15:0] qbar_unused;
  logic        cout_unused;
  regn #(.N(16)) u_reg (.inc(inc), .data(data), .clr(clr), .load(load), .clk(clk),
                        .q(q), .qbar(qbar_unused), .cout(cout_unused));
endmodule
