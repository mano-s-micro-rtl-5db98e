// mano_top: the complete basic computer. The sequence timer (timer16) gives
// the timing lines T0..T15, the controller turns them, IR, DR and the flags
// into control lines, and the datapath (mano_datapath) executes them; the
// controller's sc_clr restarts the timer at T0 for the next instruction.
// This is the original design's top-level wiring.
//
// Interface: clk; rst (synchronous, active high; hold it for at least one
// cycle, after which the computer starts at PC = 0, T0); fgi_set / fgo_set
// from the input and output devices; the output register ot and, for
// observation, PC, AC, DR, IR, the end-of-instruction strobe sc_clr, the
// memory write strobe mwrite and the ALU function alu_fn. With the default
// ROM program one pass of the counting loop takes 28 cycles and writes the
// next count to ot.
module mano_top
  import mano_pkg::*;
#(
  parameter rom_image_t PROGRAM = DEFAULT_PROGRAM
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        fgi_set,
  input  logic        fgo_set,
  output logic [15:0] ot,
  output logic [15:0] pc,
  output logic [15:0] ac,
  output logic [15:0] dr,
  output logic [15:0] ir,
  output logic        e,
  output logic        sc_clr,
  output logic        mwrite,
  output logic [2:0]  alu_fn
);
  logic [15:0] t;
  ctrl_t       ctrl;
  status_t     status;

  timer16 u_timer (.clk(clk), .clr(sc_clr | rst), .o(t));

  controller u_ctrl (.t(t), .status(status), .ctrl(ctrl), .sc_clr(sc_clr));

  mano_datapath #(.PROGRAM(PROGRAM)) u_dp (
    .clk(clk), .rst(rst), .ctrl(ctrl), .fgi_set(fgi_set), .fgo_set(fgo_set),
    .status(status), .pc(pc), .ac(ac), .ot(ot), .e(e));

  // Rules of the sequencing and the bus: exactly one timing line is active,
  // and a memory write never takes its data from the memory itself.
  a_one_timing_line: assert property (@(posedge clk) disable iff (rst) $onehot(t));
  a_write_source:    assert property (@(posedge clk) disable iff (rst)
                                      !(ctrl.mem_wr && ctrl.bus_sel == BUS_MEM));

  assign dr     = status.dr;
  assign ir     = status.ir;
  assign mwrite = ctrl.mem_wr;
  assign alu_fn = ctrl.alu_fn;
endmodule
