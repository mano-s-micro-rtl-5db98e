// tb_controller: checks every control line of the hardwired controller. The
// expected lines come from a reference written per instruction and timing
// step (what each step of each instruction must do), not per control line,
// and are compared with the controller for every memory-reference opcode
// (direct and indirect), the register-reference and I/O instructions, steps
// T0..T7, both values of R, random flags and DR zero or not.
module tb_controller;
  import mano_pkg::*;
  logic [15:0] t;
  status_t     st;
  ctrl_t       ctrl, exp_ctrl;
  logic        sc_clr, exp_sc;
  int checks = 0, failures = 0;

  controller dut (.t(t), .status(st), .ctrl(ctrl), .sc_clr(sc_clr));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: what step `s` of the instruction in IR does.
  task automatic reference(input status_t x, input int s, output ctrl_t c, output logic done);
    logic [2:0] op = x.ir[14:12];
    logic       ind = x.ir[15];
    c = '0; c.alu_fn = ALU_PASS; c.bus_sel = BUS_DR; done = 1'b0;
    if (s >= 3) c.rj = x.ien & (x.fgi | x.fgo);
    if (s <= 2 && x.r) begin
      // interrupt cycle
      case (s)
        0: begin c.ar.clr = 1; c.tr.ld = 1; c.bus_sel = BUS_PC; end
        1: begin c.mem_wr = 1; c.pc.clr = 1; c.bus_sel = BUS_TR; end
        2: begin c.pc.inc = 1; c.ienk = 1; c.rk = 1; done = 1; end
      endcase
    end else if (s == 0) begin
      c.ar.ld = 1; c.bus_sel = BUS_PC;
    end else if (s == 1) begin
      c.ir.ld = 1; c.pc.inc = 1; c.bus_sel = BUS_MEM;
    end else if (s == 2) begin
      c.ar.ld = 1; c.bus_sel = BUS_IR;
    end else if (op == 3'd7) begin
      if (s == 3) begin
        done = 1;
        if (!ind) begin
          c.ac.clr = x.ir[11];
          c.ac.inc = x.ir[5];
        end else begin
          c.fgik = x.ir[11];
          c.fgok = x.ir[10];
          c.ot.ld = x.ir[10];
          c.ienj = x.ir[7];
          c.ienk = x.ir[6];
        end
      end
    end else if (s == 3) begin
      if (ind) begin c.ar.ld = 1; c.bus_sel = BUS_MEM; end
    end else begin
      case (op)
        OP_AND, OP_ADD, OP_LDA:
          if (s == 4) begin c.dr.ld = 1; c.bus_sel = BUS_MEM; end
          else if (s == 5) begin
            c.ac.ld = 1; done = 1;
            c.alu_fn = (op == OP_AND) ? ALU_AND : (op == OP_ADD) ? ALU_ADD : ALU_PASS;
          end
        OP_STA:
          if (s == 4) begin c.mem_wr = 1; c.bus_sel = BUS_AC; done = 1; end
        OP_BUN:
          if (s == 4) begin c.pc.ld = 1; c.bus_sel = BUS_AR; done = 1; end
        OP_BSA:
          if (s == 4) begin c.mem_wr = 1; c.ar.inc = 1; c.bus_sel = BUS_PC; end
          else if (s == 5) begin c.pc.ld = 1; c.bus_sel = BUS_AR; done = 1; end
        OP_ISZ:
          if (s == 4) begin c.dr.ld = 1; c.bus_sel = BUS_MEM; end
          else if (s == 5) c.dr.inc = 1;
          else if (s == 6) begin
            c.mem_wr = 1; done = 1; c.pc.inc = (x.dr == 16'h0000);
          end
        default: ;
      endcase
    end
  endtask

  initial begin
    word_t irs [$];
    for (int op = 0; op < 7; op++) begin
      irs.push_back(mref(3'(op), 12'h123));
      irs.push_back(mref(3'(op), 12'h456, 1'b1));
    end
    irs.push_back(INSN_CLA); irs.push_back(INSN_INC); irs.push_back(16'h7FFF);
    irs.push_back(INSN_INP); irs.push_back(INSN_OUT); irs.push_back(INSN_ION);
    irs.push_back(INSN_IOF); irs.push_back(16'hFFFF);
    foreach (irs[k]) begin
      for (int s = 0; s < 8; s++) begin
        for (int rep = 0; rep < 16; rep++) begin
          st.ir  = irs[k];
          st.dr  = (rep % 2 == 0) ? 16'h0000 : (16'($urandom) | 16'h0100);
          st.r   = rep[1];
          st.ien = 1'($urandom); st.fgi = 1'($urandom); st.fgo = 1'($urandom);
          t = 16'(1 << s);
          #1;
          reference(st, s, exp_ctrl, exp_sc);
          checks++;
          if (ctrl !== exp_ctrl || sc_clr !== exp_sc) begin
            failures++;
            $display("FAIL ir=%h T%0d r=%b: ctrl=%h sc=%b expected %h sc=%b",
                     st.ir, s, st.r, ctrl, sc_clr, exp_ctrl, exp_sc);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
