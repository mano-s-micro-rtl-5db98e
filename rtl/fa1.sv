// fa1: one-bit full adder, s = x^y^z, c = x&y | (x^y)&z. Combinational; the
// upper bits of the ripple adder fan.
module fa1 (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic s,
  output logic c
);
  logic xeory;
  assign xeory = x ^ y;
  assign s     = xeory ^ z;
  assign c     = (x & y) | (xeory & z);
endmodule
