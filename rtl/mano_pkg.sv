// mano_pkg: types and constants shared by the basic-computer RTL.
//
// The machine is a 16-bit accumulator computer with a 12-bit address space.
// This implementation populates only two 64-word memory units (ROM at unit 0,
// RAM at unit 1), so the memory hardware sees 7 address bits: bit 6 picks the
// unit and bits 5..0 address a word inside it.
//
// The ALU function codes and the bus source codes are the ones of the original
// design. The ALU codes beyond SHL and bus code 000 are unused; the bus reads
// all ones when code 000 is selected. The default ROM program is the one the
// original design ships with (see rom.sv).
package mano_pkg;

  localparam int unsigned WORD_SIZE     = 16;
  localparam int unsigned ADDR_SIZE     = 12;
  localparam int unsigned MEM_UNIT_SIZE = 6;  // address bits inside one memory unit
  localparam int unsigned MEM_UNIT_WORDS = 1 << MEM_UNIT_SIZE;

  typedef logic [WORD_SIZE-1:0]     word_t;
  typedef logic [ADDR_SIZE-1:0]     addr_t;
  typedef logic [MEM_UNIT_SIZE-1:0] mem_addr_t;
  typedef word_t [MEM_UNIT_WORDS-1:0] rom_image_t;

  localparam word_t ZERO_WORD   = '0;
  localparam word_t BUS_DEFAULT = '1;

  // ALU function select
  typedef enum logic [2:0] {
    ALU_PASS = 3'b000,
    ALU_AND  = 3'b001,
    ALU_ADD  = 3'b010,
    ALU_COM  = 3'b011,
    ALU_SHR  = 3'b100,
    ALU_SHL  = 3'b101
  } alu_fn_e;

  // Common-bus source select
  typedef enum logic [2:0] {
    BUS_NONE = 3'b000,
    BUS_AR   = 3'b001,
    BUS_PC   = 3'b010,
    BUS_DR   = 3'b011,
    BUS_AC   = 3'b100,
    BUS_IR   = 3'b101,
    BUS_TR   = 3'b110,
    BUS_MEM  = 3'b111
  } bus_sel_e;

  // Instruction encodings used by the program and the testbenches.
  // Memory reference: IR[15] = I (indirect), IR[14:12] = opcode, IR[11:0] = address.
  localparam logic [2:0] OP_AND = 3'd0;
  localparam logic [2:0] OP_ADD = 3'd1;
  localparam logic [2:0] OP_LDA = 3'd2;
  localparam logic [2:0] OP_STA = 3'd3;
  localparam logic [2:0] OP_BUN = 3'd4;
  localparam logic [2:0] OP_BSA = 3'd5;
  localparam logic [2:0] OP_ISZ = 3'd6;

  // Register reference (0x7xxx) and input/output (0xFxxx) instructions
  localparam word_t INSN_CLA = 16'h7800;  // clear AC          (IR bit 11)
  localparam word_t INSN_INC = 16'h7020;  // increment AC      (IR bit 5)
  localparam word_t INSN_INP = 16'hF800;  // clear FGI         (IR bit 11)
  localparam word_t INSN_OUT = 16'hF400;  // load OTR, clr FGO (IR bit 10)
  localparam word_t INSN_ION = 16'hF080;  // interrupts on     (IR bit 7)
  localparam word_t INSN_IOF = 16'hF040;  // interrupts off    (IR bit 6)

  // Control lines of one register: load from its input, increment, clear.
  typedef struct packed {
    logic ld;
    logic inc;
    logic clr;
  } reg_ctrl_t;

  // Everything the controller drives into the datapath.
  typedef struct packed {
    logic      mem_wr;     // memory write (M[AR] <- bus)
    alu_fn_e   alu_fn;     // ALU function
    bus_sel_e  bus_sel;    // common-bus source
    reg_ctrl_t ar, pc, dr, ac, ir, tr, ot;
    logic      rj, rk;     // R   (interrupt cycle) flip-flop J/K
    logic      ienj, ienk; // IEN (interrupt enable) flip-flop J/K
    logic      fgik;       // clear FGI (set by the input device)
    logic      fgok;       // clear FGO (set by the output device)
  } ctrl_t;

  // Datapath state the controller decides on.
  typedef struct packed {
    word_t ir;
    word_t dr;
    logic  r, ien, fgi, fgo;
  } status_t;

  function automatic word_t mref(logic [2:0] op, addr_t adr, logic ind = 1'b0);
    return {ind, op, adr};
  endfunction

  // Counter loop: load M[$40], increment, output, store back, clear AC, repeat.
  function automatic rom_image_t default_program();
    rom_image_t img;
    for (int i = 0; i < MEM_UNIT_WORDS; i++) img[i] = mref(OP_BUN, 12'h000);
    img[0] = mref(OP_LDA, 12'h040);
    img[1] = INSN_INC;
    img[2] = INSN_OUT;
    img[3] = mref(OP_STA, 12'h040);
    img[4] = INSN_CLA;
    return img;
  endfunction

  localparam rom_image_t DEFAULT_PROGRAM = default_program();

endpackage
