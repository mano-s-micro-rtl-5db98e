// dec2x4: 2-to-4 line decoder without enable, built as in the original
// design: a 1x2 decoder on the high select bit enables one of two 1x2
// decoders with enable that decode the low bit. Combinational.
module dec2x4 (
  input  logic [1:0] sel,
  output logic [3:0] o
);
  logic [1:0] chipsel;
  dec1x2  u_sel   (.sel(sel[1]), .o(chipsel));
  dec1x2e u_chip0 (.sel(sel[0]), .en(chipsel[0]), .o(o[1:0]));
  dec1x2e u_chip1 (.sel(sel[0]), .en(chipsel[1]), .o(o[3:2]));
endmodule
