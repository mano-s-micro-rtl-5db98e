// mem: the computer's memory, made of two 64-word units selected by address
// bit 6: unit 0 (bit 6 = 0) is the ROM, unit 1 (bit 6 = 1) the RAM. Bits
// 5..0 address the word inside the unit; bits 11..7 are not decoded, so the
// 128 words repeat through the 4096-word address space. Writes reach the RAM
// only when bit 6 is 1 and are ignored for ROM addresses. Read is
// combinational; write on the rising clock edge. This is the original
// design's arrangement.
module mem
  import mano_pkg::*;
#(
  parameter rom_image_t PROGRAM = DEFAULT_PROGRAM
) (
  input  word_t data,
  input  addr_t address,
  input  logic  we,
  input  logic  clock,
  output word_t q
);
  logic  ram_sel, writes;
  word_t qs_ram, qs_rom;

  assign ram_sel = address[MEM_UNIT_SIZE];
  assign writes  = we & ram_sel;

  ram                    u_ram (.data(data), .address(address[MEM_UNIT_SIZE-1:0]), .we(writes),
                                .clock(clock), .q(qs_ram));
  rom #(.PROGRAM(PROGRAM)) u_rom (.address(address[MEM_UNIT_SIZE-1:0]), .q(qs_rom));

  assign q = ram_sel ? qs_ram : qs_rom;
endmodule
