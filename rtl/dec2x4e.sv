// dec2x4e: 2-to-4 line decoder with enable, built as in the original design
// from three 1x2 decoders with enable: the high select bit, gated by en,
// picks which of two low-bit decoders is enabled. Combinational.
module dec2x4e (
  input  logic [1:0] sel,
  input  logic       en,
  output logic [3:0] o
);
  logic [1:0] chipsel;
  dec1x2e u_sel   (.sel(sel[1]), .en(en),         .o(chipsel));
  dec1x2e u_chip0 (.sel(sel[0]), .en(chipsel[0]), .o(o[1:0]));
  dec1x2e u_chip1 (.sel(sel[0]), .en(chipsel[1]), .o(o[3:2]));
endmodule
