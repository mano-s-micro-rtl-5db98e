// reg12: 12-bit register with 16-bit data lines, used for AR and PC. The four
// leading input bits are ignored and the output is padded with four zeros,
// so it plugs into the 16-bit bus like the other registers (the original
// design's arrangement). Clear, load and increment as in regn; increments
// wrap modulo 4096. Updates on the rising clock edge.
module reg12 (
  input  logic        inc,
  input  logic [15:0] data,
  input  logic        clr,
  input  logic        load,
  input  logic        clk,
  output logic [15:0] q
);
  logic [11:0] qs;
  logic [11:0] qbar_unused;
  logic        cout_unused;
  regn #(.N(12)) u_reg (.inc(inc), .data(data[11:0]), .clr(clr), .load(load), .clk(clk),
                        .q(qs), .qbar(qbar_unused), .cout(cout_unused));
  assign q = {4'b0000, qs};
endmodule
