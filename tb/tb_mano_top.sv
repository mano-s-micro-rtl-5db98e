// tb_mano_top: end-to-end test of the complete computer. Two copies run side
// by side:
//  * u_loop keeps the default ROM (the counting loop) and must output
//    v, v+1, v+2, ... on its output register;
//  * u_prog gets a test program in its ROM that uses every instruction and
//    mechanism the controller implements: AND, ADD with a carry into E, LDA,
//    STA, CLA, INC, an indirect LDA, OUT, BSA with a return through an
//    indirect BUN, ISZ without and with a skip, ION, an interrupt raised by
//    the input flag FGI (interrupt cycle, ignored store of the return address
//    into ROM word 0, jump to word 1), INP and IOF.
// Every instruction's length in clock cycles (from one end-of-instruction
// strobe to the next) is checked against its step count, the final state of
// registers and RAM against hand-worked values, and every mechanism must
// occur at least once.
module tb_mano_top;
  import mano_pkg::*;

  function automatic rom_image_t test_program();
    rom_image_t p;
    for (int i = 0; i < 64; i++) p[i] = mref(OP_BUN, 12'(i));  // stray jumps trap in place
    p['h00] = mref(OP_BUN, 12'h010);
    p['h01] = mref(OP_BUN, 12'h030);        // interrupt vector
    p['h10] = mref(OP_LDA, 12'h028);        // AC = 00FF
    p['h11] = mref(OP_AND, 12'h029);        // AC = 000F
    p['h12] = mref(OP_ADD, 12'h02A);        // AC = 0004, E = 1
    p['h13] = mref(OP_STA, 12'h040);        // M[40] = 0004
    p['h14] = INSN_CLA;
    p['h15] = mref(OP_LDA, 12'h02B, 1'b1);  // AC = M[M[2B]] = M[40] = 0004
    p['h16] = INSN_OUT;                     // OTR = 0004
    p['h17] = mref(OP_LDA, 12'h02C);        // AC = C041 (BUN I 041)
    p['h18] = mref(OP_STA, 12'h042);        // subroutine body in RAM
    p['h19] = mref(OP_BSA, 12'h041);        // M[41] = 01A, run from 042
    p['h1A] = mref(OP_LDA, 12'h02E);        // AC = FFFE
    p['h1B] = mref(OP_STA, 12'h043);
    p['h1C] = mref(OP_ISZ, 12'h043);        // FFFF, no skip
    p['h1D] = mref(OP_ISZ, 12'h043);        // 0000, skip
    p['h1E] = mref(OP_BUN, 12'h01E);        // must be skipped
    p['h1F] = INSN_ION;
    p['h20] = INSN_INC;                     // AC = FFFF
    p['h21] = mref(OP_BUN, 12'h021);        // wait for the interrupt
    p['h28] = 16'h00FF;
    p['h29] = 16'h0F0F;
    p['h2A] = 16'hFFF5;
    p['h2B] = 16'h0040;
    p['h2C] = 16'hC041;
    p['h2D] = 16'h1234;
    p['h2E] = 16'hFFFE;
    p['h30] = INSN_INP;                     // service routine
    p['h31] = mref(OP_LDA, 12'h02D);
    p['h32] = INSN_OUT;                     // OTR = 1234
    p['h33] = INSN_IOF;
    p['h34] = mref(OP_BUN, 12'h034);        // done
    return p;
  endfunction

  localparam rom_image_t PROG = test_program();

  logic clk = 0, rst, fgi_set;
  logic [15:0] l_ot, l_pc, l_ac, l_dr, l_ir, p_ot, p_pc, p_ac, p_dr, p_ir;
  logic l_e, l_sc, l_mw, p_e, p_sc, p_mw;
  logic [2:0] l_fn, p_fn;
  int checks = 0, failures = 0, cycles = 0;
  int loop_outs = 0;
  word_t v;

  // mechanism counters
  int n_indirect = 0, n_bsa = 0, n_isz_skip = 0, n_isz_noskip = 0, n_irq = 0, n_rom_wr = 0;
  int n_carry = 0, n_out = 0, n_inp = 0, n_ion = 0, n_iof = 0, n_and = 0, n_add = 0;
  int n_trap = 0, n_instr = 0, n_irq_fgi = 0;

  mano_top u_loop (.clk(clk), .rst(rst), .fgi_set(1'b0), .fgo_set(1'b0), .ot(l_ot), .pc(l_pc),
                   .ac(l_ac), .dr(l_dr), .ir(l_ir), .e(l_e), .sc_clr(l_sc), .mwrite(l_mw), .alu_fn(l_fn));

  mano_top #(.PROGRAM(PROG)) u_prog (.clk(clk), .rst(rst), .fgi_set(fgi_set), .fgo_set(1'b0),
                   .ot(p_ot), .pc(p_pc), .ac(p_ac), .dr(p_dr), .ir(p_ir), .e(p_e), .sc_clr(p_sc),
                   .mwrite(p_mw), .alu_fn(p_fn));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 2000) begin
      failures++;
      $display("FAIL watchdog");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic expect_eq(input string what, input logic [15:0] got, input logic [15:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s = %h, expected %h", what, got, want);
    end
  endtask

  // Instruction length of the program copy, sampled in each cycle
  int len = 0;
  always @(negedge clk) begin
    if (rst) len = 0;
    else begin
      len++;
      if (p_sc) begin
        int want;
        if (u_prog.status.r && u_prog.t[2]) want = 3;
        else if (p_ir[14:12] == 3'd7) want = 4;
        else case (p_ir[14:12])
          OP_STA, OP_BUN: want = 5;
          OP_ISZ:         want = 7;
          default:        want = 6;
        endcase
        checks++;
        if (len != want) begin
          failures++;
          $display("FAIL instruction %h took %0d cycles, expected %0d", p_ir, len, want);
        end
        n_instr++;
        len = 0;
      end
    end
  end

  // Mechanism monitors on the program copy
  always @(negedge clk) if (!rst) begin
    automatic logic [15:0] t = u_prog.t;
    if (t[3] && p_ir[15] && p_ir[14:12] != 3'd7) n_indirect++;
    if (t[5] && p_ir[14:12] == OP_BSA) n_bsa++;
    if (t[6] && p_ir[14:12] == OP_ISZ) begin
      if (p_dr == 16'h0000) n_isz_skip++; else n_isz_noskip++;
    end
    if (u_prog.status.r && t[0]) n_irq++;
    if (u_prog.status.r && t[0] && u_prog.status.fgi && !u_prog.status.fgo) n_irq_fgi++;
    if (p_mw && !u_prog.u_dp.ar_q[6]) n_rom_wr++;
    if (t[5] && p_ir[14:12] == OP_ADD && u_prog.u_dp.u_alu.e) n_carry++;
    if (t[3] && p_ir == INSN_OUT) n_out++;
    if (t[3] && p_ir == INSN_INP) n_inp++;
    if (t[3] && p_ir == INSN_ION) n_ion++;
    if (t[3] && p_ir == INSN_IOF) n_iof++;
    if (p_fn == ALU_AND) n_and++;
    if (p_fn == ALU_ADD) n_add++;
    if (t[2] && p_ir == 16'h401E) n_trap++;
  end

  // Counting-loop copy: each output must be the next count
  always @(negedge clk) if (!rst && u_loop.ctrl.ot.ld) begin
    @(negedge clk);
    expect_eq("loop output", l_ot, 16'(v + loop_outs));
    loop_outs++;
  end

  task automatic mech(input string name, input int n);
    checks++;
    $display("mechanism %-22s %0d", name, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism %s never happened", name);
    end
  endtask

  initial begin
    rst = 1; fgi_set = 0;
    repeat (2) @(negedge clk);
    v = u_loop.u_dp.u_mem.u_ram.mem_q[0];
    rst = 0;
    // first OUT of the program: OTR = 0004, E set by the ADD
    wait (n_out == 1);
    repeat (2) @(negedge clk);
    expect_eq("first output", p_ot, 16'h0004);
    expect_eq("E after ADD carry", 16'(p_e), 1);
    // wait until the program idles at 021 with interrupts on
    wait (p_pc == 16'h0022 && u_prog.status.ien);
    repeat (10) @(negedge clk);
    expect_eq("AC after INC", p_ac, 16'hFFFF);
    expect_eq("M[41] return address", u_prog.u_dp.u_mem.u_ram.mem_q[1], 16'h001A);
    expect_eq("M[42] subroutine", u_prog.u_dp.u_mem.u_ram.mem_q[2], 16'hC041);
    expect_eq("M[43] after ISZ", u_prog.u_dp.u_mem.u_ram.mem_q[3], 16'h0000);
    expect_eq("M[40]", u_prog.u_dp.u_mem.u_ram.mem_q[0], 16'h0004);
    // raise the input flag
    fgi_set = 1; @(negedge clk); fgi_set = 0;
    wait (p_pc == 16'h0035);
    repeat (20) @(negedge clk);
    expect_eq("service output", p_ot, 16'h1234);
    expect_eq("AC in service", p_ac, 16'h1234);
    expect_eq("IEN after IOF", 16'(u_prog.status.ien), 0);
    expect_eq("FGI after INP", 16'(u_prog.status.fgi), 0);
    expect_eq("M[40] unchanged by the ROM store", u_prog.u_dp.u_mem.u_ram.mem_q[0], 16'h0004);
    expect_eq("skipped word never fetched", 16'(n_trap), 0);
    mech("indirect address", n_indirect);
    mech("BSA", n_bsa);
    mech("ISZ skip", n_isz_skip);
    mech("ISZ no skip", n_isz_noskip);
    mech("interrupt cycle", n_irq);
    mech("interrupt raised by FGI", n_irq_fgi);
    mech("ignored ROM write", n_rom_wr);
    mech("ADD carry into E", n_carry);
    mech("OUT", n_out);
    mech("INP", n_inp);
    mech("ION", n_ion);
    mech("IOF", n_iof);
    mech("ALU AND", n_and);
    mech("ALU ADD", n_add);
    mech("counting-loop outputs", loop_outs);
    $display("instructions timed: %0d", n_instr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
