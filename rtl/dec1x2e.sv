// dec1x2e: 1-to-2 line decoder with enable. With en low both outputs are 0;
// with en high o[sel] is 1. Purely combinational leaf cell of the decoder
// trees, as in the original design.
module dec1x2e (
  input  logic       sel,
  input  logic       en,
  output logic [1:0] o
);
  assign o = {sel & en, ~sel & en};
endmodule
