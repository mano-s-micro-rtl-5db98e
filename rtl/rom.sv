// rom: memory unit 0, a 64-word read-only memory with a combinational read
// (q follows address in the same cycle). Its contents are the parameter
// PROGRAM, which defaults to the original design's test program:
//   000 LDA $40   001 INC   002 OUT   003 STA $40   004 CLA   005.. BUN 0
// A testbench may load a different program through the parameter.
module rom
  import mano_pkg::*;
#(
  parameter rom_image_t PROGRAM = DEFAULT_PROGRAM
) (
  input  mem_addr_t address,
  output word_t     q
);
  assign q = PROGRAM[address];
endmodule
