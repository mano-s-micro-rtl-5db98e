// buslines: the common bus, a 16-bit multiplexer that puts one source on
// the bus according to the 3-bit select code (mano_pkg::bus_sel_e):
// AR=1, PC=2, DR=3, AC=4, IR=5, TR=6, memory=7. Code 0 drives all ones.
// Combinational. Codes and default value follow the original design.
module buslines
  import mano_pkg::*;
(
  input  word_t    ar,
  input  word_t    pc,
  input  word_t    dr,
  input  word_t    ac,
  input  word_t    ir,
  input  word_t    tr,
  input  word_t    memory,
  input  bus_sel_e sel,
  output word_t    q
);
  always_comb begin
    unique case (sel)
      BUS_AR:  q = ar;
      BUS_PC:  q = pc;
      BUS_DR:  q = dr;
      BUS_AC:  q = ac;
      BUS_IR:  q = ir;
      BUS_TR:  q = tr;
      BUS_MEM: q = memory;
      default: q = BUS_DEFAULT;
    endcase
  end
endmodule
