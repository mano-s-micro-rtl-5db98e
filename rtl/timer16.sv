// timer16: the sequence counter SC and its timing decoder. A 4-bit regn
// counts up every clock (its increment line is the inverse of clr) and a
// 4x16 decoder turns the count into the one-hot timing lines t[0..15]
// (T0, T1, ...). A high clr (SC <- 0) makes the next cycle T0. This is the
// original design's structure. Counting past T15 wraps to T0; no
// instruction of the computer needs more than T6.
module timer16 (
  input  logic        clk,
  input  logic        clr,
  output logic [15:0] o
);
  logic [3:0] qs, qbar_unused;
  logic       cout_unused;

  regn #(.N(4)) u_counter (.inc(~clr), .data(4'b0000), .clr(clr), .load(1'b0), .clk(clk),
                           .q(qs), .qbar(qbar_unused), .cout(cout_unused));
  dec4x16 u_dec (.sel(qs), .o(o));
endmodule
