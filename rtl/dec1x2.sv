// dec1x2: 1-to-2 line decoder without enable. o[0] is active when sel is 0,
// o[1] when sel is 1. Purely combinational. Leaf cell of the decoder trees,
// as in the original design.
module dec1x2 (
  input  logic       sel,
  output logic [1:0] o
);
  assign o = {sel, ~sel};
endmodule
