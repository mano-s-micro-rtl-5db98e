// controller: hardwired control unit. Every cycle it combines the timing
// lines t[0..15] from the sequence counter, the opcode decoded from IR[14:12]
// into D0..D7 (dec3x8), the indirect bit I = IR[15], the flags and DR into
// the control lines of the datapath. It has no state of its own; sc_clr ends
// the current instruction (SC <- 0, so the next cycle is T0).
//
// Cycle by cycle (R is the interrupt-cycle flag):
//   ~R T0  AR <- PC                     R T0  AR <- 0, TR <- PC
//   ~R T1  IR <- M[AR], PC <- PC+1      R T1  M[AR] <- TR, PC <- 0
//   ~R T2  AR <- IR[11:0]               R T2  PC <- PC+1, IEN <- 0, R <- 0, end
//   T3 memory reference: if I, AR <- M[AR]
//   AND/ADD/LDA  T4 DR <- M[AR]; T5 AC <- AC&DR / AC+DR (E <- carry) / DR, end
//   STA          T4 M[AR] <- AC, end
//   BUN          T4 PC <- AR, end
//   BSA          T4 M[AR] <- PC, AR <- AR+1; T5 PC <- AR, end
//   ISZ          T4 DR <- M[AR]; T5 DR <- DR+1; T6 M[AR] <- DR, PC+1 if DR = 0, end
//   register reference (D7, I = 0), T3: CLA (IR11) AC <- 0; INC (IR5) AC <- AC+1; end
//   input/output       (D7, I = 1), T3: INP (IR11) FGI <- 0; OUT (IR10) OTR <- bus
//                      (carrying DR), FGO <- 0; ION (IR7) IEN <- 1; IOF (IR6) IEN <- 0; end
//   R is set in any cycle other than T0..T2 when IEN and (FGI or FGO).
//
// The instruction set it covers is the original design's: its listing
// implements the test program's instructions (LDA, INC, OUT, STA, CLA, BUN)
// and most of ISZ, BSA, the interrupt cycle and ION/IOF. This implementation
// completes the interrupt cycle (the store of the return address, PC <- 1 and
// the clearing of IEN), the PC <- AR step of BSA, the memory reads of ADD and
// ISZ, and uses the ALU's AND and ADD functions for the AND and ADD
// instructions. The other register-reference instructions, INPR and the skip
// instructions are not part of the design. OUT copies the bus while DR is on
// it, as in the original design, so the output register receives the value
// the last memory read brought into DR.
module controller
  import mano_pkg::*;
(
  input  logic [15:0] t,
  input  status_t     status,
  output ctrl_t       ctrl,
  output logic        sc_clr
);
  logic [7:0] d;
  logic       i, p, lcr, zflag, r;
  logic       sel_pc, sel_mem, sel_tr, sel_ac, sel_ir, sel_ar;
  word_t      ir;

  assign ir = status.ir;
  assign r  = status.r;

  dec3x8 u_insdecode (.sel(ir[14:12]), .o(d));

  assign i     = ir[15];
  assign p     = d[7] & i & t[3];      // input/output instruction
  assign lcr   = d[7] & ~i & t[3];     // register-reference instruction
  assign zflag = (status.dr == ZERO_WORD);

  // Sequence counter clear (end of instruction)
  assign sc_clr = (r & t[2]) |
                  (d[0] & t[5]) | (d[1] & t[5]) | (d[2] & t[5]) |
                  (d[3] & t[4]) | (d[4] & t[4]) | (d[5] & t[5]) |
                  (d[6] & t[6]) | lcr | p;

  // Bus source requests
  assign sel_pc  = t[0] | (d[5] & t[4]);
  assign sel_mem = (~r & t[1]) | (d[0] & t[4]) | (d[1] & t[4]) | (d[2] & t[4]) |
                   (d[6] & t[4]) | (~d[7] & i & t[3]);
  assign sel_tr  = r & t[1];
  assign sel_ac  = d[3] & t[4];
  assign sel_ir  = ~r & t[2];
  assign sel_ar  = (d[4] & t[4]) | (d[5] & t[5]);

  always_comb begin
    ctrl = '0;

    // Flags
    ctrl.rj   = ~t[0] & ~t[1] & ~t[2] & status.ien & (status.fgi | status.fgo);
    ctrl.rk   = r & t[2];
    ctrl.ienj = p & ir[7];
    ctrl.ienk = (p & ir[6]) | (r & t[2]);
    ctrl.fgik = p & ir[11];
    ctrl.fgok = p & ir[10];

    // ALU
    if (d[0] & t[5])      ctrl.alu_fn = ALU_AND;
    else if (d[1] & t[5]) ctrl.alu_fn = ALU_ADD;
    else                  ctrl.alu_fn = ALU_PASS;

    // Memory write
    ctrl.mem_wr = (d[3] & t[4]) | (d[5] & t[4]) | (d[6] & t[6]) | (r & t[1]);

    // AR
    ctrl.ar.ld  = (~r & t[0]) | (~r & t[2]) | (~d[7] & i & t[3]);
    ctrl.ar.clr = r & t[0];
    ctrl.ar.inc = d[5] & t[4];

    // PC
    ctrl.pc.ld  = (d[4] & t[4]) | (d[5] & t[5]);
    ctrl.pc.clr = r & t[1];
    ctrl.pc.inc = (~r & t[1]) | (d[6] & t[6] & zflag) | (r & t[2]);

    // DR
    ctrl.dr.ld  = (d[0] & t[4]) | (d[1] & t[4]) | (d[2] & t[4]) | (d[6] & t[4]);
    ctrl.dr.inc = d[6] & t[5];

    // TR, IR
    ctrl.tr.ld = r & t[0];
    ctrl.ir.ld = ~r & t[1];

    // AC
    ctrl.ac.ld  = (d[0] & t[5]) | (d[1] & t[5]) | (d[2] & t[5]);
    ctrl.ac.inc = lcr & ir[5];
    ctrl.ac.clr = lcr & ir[11];

    // Output register
    ctrl.ot.ld = p & ir[10];

    // Bus select, first request wins; DR when nothing else is asked for
    if (sel_pc)       ctrl.bus_sel = BUS_PC;
    else if (sel_mem) ctrl.bus_sel = BUS_MEM;
    else if (sel_tr)  ctrl.bus_sel = BUS_TR;
    else if (sel_ac)  ctrl.bus_sel = BUS_AC;
    else if (sel_ir)  ctrl.bus_sel = BUS_IR;
    else if (sel_ar)  ctrl.bus_sel = BUS_AR;
    else              ctrl.bus_sel = BUS_DR;
  end
endmodule
