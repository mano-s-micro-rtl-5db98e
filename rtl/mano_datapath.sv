// mano_datapath: the basic computer without its control unit. Registers AR
// and PC (12 bit, reg12), DR, AC, IR, TR and the output register OTR (16
// bit, reg16) all take their input from the common bus, except AC, which
// takes the ALU output. The ALU sees DR on D0 and AC on D1. Memory is
// addressed by AR and written from the bus. The flags R, IEN, FGI and FGO are
// JK flip-flops driven by the controller; FGI and FGO are set by the I/O
// devices through fgi_set / fgo_set and cleared by the controller.
//
// Every register and flag changes on the rising clock edge. A synchronous
// rst clears all registers and flags (and E); it is this implementation's
// addition, as the original design leaves power-up state to the hardware.
// The E flip-flop is also an addition the original design asks for but does
// not build: it takes the ALU's carry/shift-out bit whenever AC is loaded by
// ADD, SHR or SHL, and feeds the ALU's carry/shift-in.
module mano_datapath
  import mano_pkg::*;
#(
  parameter rom_image_t PROGRAM = DEFAULT_PROGRAM
) (
  input  logic    clk,
  input  logic    rst,
  input  ctrl_t   ctrl,
  input  logic    fgi_set,
  input  logic    fgo_set,
  output status_t status,
  output word_t   pc,
  output word_t   ac,
  output word_t   ot,
  output logic    e
);
  word_t bus_data, alu_out, mem_out;
  word_t ar_q, pc_q, dr_q, ac_q, ir_q, tr_q;
  logic  alu_e, e_ld;
  logic  r_q, ien_q, fgi_q, fgo_q;
  logic  r_nq, ien_nq, fgi_nq, fgo_nq, e_nq;

  // Flags (reset forces K and masks J)
  jkfflop u_ff_r   (.j(ctrl.rj   & ~rst), .k(ctrl.rk   | rst), .clk(clk), .q(r_q),   .qbar(r_nq));
  jkfflop u_ff_ien (.j(ctrl.ienj & ~rst), .k(ctrl.ienk | rst), .clk(clk), .q(ien_q), .qbar(ien_nq));
  jkfflop u_ff_fgi (.j(fgi_set   & ~rst), .k(ctrl.fgik | rst), .clk(clk), .q(fgi_q), .qbar(fgi_nq));
  jkfflop u_ff_fgo (.j(fgo_set   & ~rst), .k(ctrl.fgok | rst), .clk(clk), .q(fgo_q), .qbar(fgo_nq));

  // E: carry / shift link bit
  assign e_ld = ctrl.ac.ld & ~ctrl.ac.clr &
                (ctrl.alu_fn inside {ALU_ADD, ALU_SHR, ALU_SHL});
  jkfflop u_ff_e (.j(e_ld & alu_e & ~rst), .k((e_ld & ~alu_e) | rst), .clk(clk),
                  .q(e), .qbar(e_nq));

  // Registers
  reg16 u_ir (.inc(ctrl.ir.inc), .data(bus_data), .clr(ctrl.ir.clr | rst), .load(ctrl.ir.ld), .clk(clk), .q(ir_q));
  reg16 u_dr (.inc(ctrl.dr.inc), .data(bus_data), .clr(ctrl.dr.clr | rst), .load(ctrl.dr.ld), .clk(clk), .q(dr_q));
  reg12 u_pc (.inc(ctrl.pc.inc), .data(bus_data), .clr(ctrl.pc.clr | rst), .load(ctrl.pc.ld), .clk(clk), .q(pc_q));
  reg16 u_tr (.inc(ctrl.tr.inc), .data(bus_data), .clr(ctrl.tr.clr | rst), .load(ctrl.tr.ld), .clk(clk), .q(tr_q));
  reg16 u_ot (.inc(ctrl.ot.inc), .data(bus_data), .clr(ctrl.ot.clr | rst), .load(ctrl.ot.ld), .clk(clk), .q(ot));
  reg12 u_ar (.inc(ctrl.ar.inc), .data(bus_data), .clr(ctrl.ar.clr | rst), .load(ctrl.ar.ld), .clk(clk), .q(ar_q));
  reg16 u_ac (.inc(ctrl.ac.inc), .data(alu_out),  .clr(ctrl.ac.clr | rst), .load(ctrl.ac.ld), .clk(clk), .q(ac_q));

  // Memory
  mem #(.PROGRAM(PROGRAM)) u_mem (.data(bus_data), .address(ar_q[ADDR_SIZE-1:0]),
                                  .we(ctrl.mem_wr & ~rst), .clock(clk), .q(mem_out));

  // Bus
  buslines u_bus (.ar(ar_q), .pc(pc_q), .dr(dr_q), .ac(ac_q), .ir(ir_q), .tr(tr_q),
                  .memory(mem_out), .sel(ctrl.bus_sel), .q(bus_data));

  // ALU
  alu u_alu (.ein(e), .d0(dr_q), .d1(ac_q), .fn(ctrl.alu_fn), .e(alu_e), .q(alu_out));

  assign status = '{ir: ir_q, dr: dr_q, r: r_q, ien: ien_q, fgi: fgi_q, fgo: fgo_q};
  assign pc     = pc_q;
  assign ac     = ac_q;
endmodule
