// dec4x16: 4-to-16 line decoder (one-hot output o[sel]). Structure follows
// the original design: a 2x4 decoder on sel[3:2] enables one of four 2x4
// decoders with enable, each decoding sel[1:0]. Combinational; the sequence
// timer uses it to turn its count into the timing lines T0..T15.
module dec4x16 (
  input  logic [3:0]  sel,
  output logic [15:0] o
);
  logic [3:0] chipsel;
  dec2x4 u_sel (.sel(sel[3:2]), .o(chipsel));
  for (genvar g = 0; g < 4; g++) begin : g_chip
    dec2x4e u_chip (.sel(sel[1:0]), .en(chipsel[g]), .o(o[4*g+3 -: 4]));
  end
endmodule
