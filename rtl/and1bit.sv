// and1bit: a two-input AND gate as a cell, z = x & y. The bitwise AND of the
// ALU is built from N of them.
module and1bit (
  input  logic x,
  input  logic y,
  output logic z
);
  assign z = x & y;
endmodule
