// reg1: one bit of a register with clear, load and count, following the
// original bit-cell design around a JK flip-flop:
//   J = cin | data&ld,  K = cin | ~data&ld | clr,  cout = q & cin.
// cin is the count carry from the bit below (toggle when 1). The enclosing
// regn makes ld, cin and clr mutually exclusive, so a clear wins over a
// load, and a load over an increment. Updates on the rising clock edge.
module reg1 (
  input  logic cin,
  input  logic data,
  input  logic clr,
  input  logic ld,
  input  logic clk,
  output logic q,
  output logic qbar,
  output logic cout
);
  logic js, ks;
  assign js   = cin | (data & ld);
  assign ks   = cin | (~data & ld) | clr;
  assign cout = q & cin;
  jkfflop u_ff (.j(js), .k(ks), .clk(clk), .q(q), .qbar(qbar));
endmodule
