// alu: the 16-bit ALU that feeds the accumulator. D0 is wired to DR and D1
// to AC. Functions (codes in mano_pkg):
//   PASS  q = D0                    (AC <- DR, used by LDA)
//   AND   q = D0 & D1               bitwise, through andnbit
//   ADD   q = D0 + D1, e = carry    through the ripple adder fan
//   COM   q = ~D0
//   SHR   q = {ein, D0[15:1]}, e = D0[0]   (rotate right through E)
//   SHL   q = {D0[14:0], ein}, e = D0[15]  (rotate left through E)
// Unused codes give q = 0, e = 0. Outside ADD/SHR/SHL e is 0.
// PASS, AND and ADD are the original design's; COM, SHR and SHL are only
// named by it (function codes and the internal signal names notD0, ror,
// rol), so their exact behaviour, including which operand they act on, is
// this implementation's reading. Purely combinational.
module alu
  import mano_pkg::*;
(
  input  logic    ein,
  input  word_t   d0,
  input  word_t   d1,
  input  alu_fn_e fn,
  output logic    e,
  output word_t   q
);
  word_t and2, add2;
  logic  cout;

  andnbit #(.N(WORD_SIZE)) u_and (.x(d0), .y(d1), .s(and2));
  fan     #(.N(WORD_SIZE)) u_add (.x(d0), .y(d1), .s(add2), .cout(cout));

  always_comb begin
    q = ZERO_WORD;
    e = 1'b0;
    unique case (fn)
      ALU_PASS: q = d0;
      ALU_AND:  q = and2;
      ALU_ADD:  begin q = add2; e = cout; end
      ALU_COM:  q = ~d0;
      ALU_SHR:  begin q = {ein, d0[WORD_SIZE-1:1]}; e = d0[0]; end
      ALU_SHL:  begin q = {d0[WORD_SIZE-2:0], ein}; e = d0[WORD_SIZE-1]; end
      default:  ;
    endcase
  end
endmodule
