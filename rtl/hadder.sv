// hadder: one-bit half adder, s = x^y, c = x&y. Combinational; bit 0 of the
// ripple adder fan.
module hadder (
  input  logic x,
  input  logic y,
  output logic s,
  output logic c
);
  assign s = x ^ y;
  assign c = x & y;
endmodule
