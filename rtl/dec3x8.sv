// dec3x8: 3-to-8 line decoder (one-hot output o[sel]). Structure follows the
// original design: a 1x2 decoder on sel[2] enables one of two 2x4 decoders
// with enable, each decoding sel[1:0]. Combinational; the controller uses it
// to decode the opcode IR[14:12] into D0..D7.
module dec3x8 (
  input  logic [2:0] sel,
  output logic [7:0] o
);
  logic [1:0] chipsel;
  dec1x2  u_sel   (.sel(sel[2]), .o(chipsel));
  dec2x4e u_chip0 (.sel(sel[1:0]), .en(chipsel[0]), .o(o[3:0]));
  dec2x4e u_chip1 (.sel(sel[1:0]), .en(chipsel[1]), .o(o[7:4]));
endmodule
