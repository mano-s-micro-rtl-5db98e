// tb_mano_copy: the computer runs a block-copy program. A three-word
// subroutine (return slot, INC, BUN I $50) is copied from ROM $38 to RAM $50
// by a loop that reads through a source pointer (LDA I), writes through a
// destination pointer (STA I) and advances both pointers and a count with
// ISZ; the count reaching zero skips the loop's back jump. The copied
// subroutine is then called twice with BSA, each call incrementing AC, and
// the result is stored to $47. Checks the copy, the pointers, the count,
// the return address left in $50 and the result, and the cycle total.
module tb_mano_copy;
  import mano_pkg::*;

  function automatic rom_image_t copy_program();
    rom_image_t p;
    for (int i = 0; i < 64; i++) p[i] = mref(OP_BUN, 12'(i));
    p['h00] = mref(OP_BUN, 12'h010);
    p['h10] = mref(OP_LDA, 12'h030);         // source pointer = $38
    p['h11] = mref(OP_STA, 12'h044);
    p['h12] = mref(OP_LDA, 12'h031);         // destination pointer = $50
    p['h13] = mref(OP_STA, 12'h045);
    p['h14] = mref(OP_LDA, 12'h032);         // count = -3
    p['h15] = mref(OP_STA, 12'h046);
    p['h16] = mref(OP_LDA, 12'h044, 1'b1);   // loop: AC = M[src]
    p['h17] = mref(OP_STA, 12'h045, 1'b1);   //       M[dst] = AC
    p['h18] = mref(OP_ISZ, 12'h044);
    p['h19] = mref(OP_ISZ, 12'h045);
    p['h1A] = mref(OP_ISZ, 12'h046);         //       skip when done
    p['h1B] = mref(OP_BUN, 12'h016);
    p['h1C] = INSN_CLA;
    p['h1D] = mref(OP_BSA, 12'h050);
    p['h1E] = mref(OP_BSA, 12'h050);
    p['h1F] = mref(OP_STA, 12'h047);
    p['h20] = mref(OP_BUN, 12'h020);         // done
    p['h30] = 16'h0038;
    p['h31] = 16'h0050;
    p['h32] = 16'hFFFD;
    p['h38] = 16'h0000;                      // subroutine: return slot
    p['h39] = INSN_INC;
    p['h3A] = mref(OP_BUN, 12'h050, 1'b1);   // return
    return p;
  endfunction

  localparam rom_image_t PROG = copy_program();
  // Cycles up to the final BUN: BUN $10 (5), set-up 3 LDA + 3 STA, three loop
  // passes (the last skips its BUN), CLA (4), two calls, STA (5).
  localparam int PASS   = 6 + 5 + 7 + 7 + 7 + 5;        // LDA I, STA I, 3 ISZ, BUN
  localparam int LAST   = 6 + 5 + 7 + 7 + 7;            // final pass skips the BUN
  localparam int CALL   = 6 + 4 + 5;                    // BSA, INC, BUN I
  localparam int CYCLES = 5 + 3 * 6 + 3 * 5 + 2 * PASS + LAST + 4 + 2 * CALL + 5;

  logic clk = 0, rst;
  logic [15:0] ot, pc, ac, dr, ir;
  logic e, sc_clr, mwrite;
  logic [2:0] alu_fn;
  int checks = 0, failures = 0, cycles = 0, run_cycles = -1;

  mano_top #(.PROGRAM(PROG)) dut (.clk(clk), .rst(rst), .fgi_set(1'b0), .fgo_set(1'b0), .ot(ot),
                                  .pc(pc), .ac(ac), .dr(dr), .ir(ir), .e(e), .sc_clr(sc_clr),
                                  .mwrite(mwrite), .alu_fn(alu_fn));

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

  function automatic word_t ram(int a);
    return dut.u_dp.u_mem.u_ram.mem_q[a - 'h40];
  endfunction

  initial begin
    int start;
    rst = 1;
    repeat (2) @(negedge clk);
    rst = 0;
    start = cycles;
    // the program has finished when it fetches the BUN at $20
    wait (ir == mref(OP_BUN, 12'h020) && dut.t[2]);
    run_cycles = cycles - start - 2;   // back from its T2 to its T0
    repeat (10) @(negedge clk);
    expect_eq("copied INC", ram('h51), INSN_INC);
    expect_eq("copied return jump", ram('h52), 16'hC050);
    expect_eq("return address left in $50", ram('h50), 16'h001F);
    expect_eq("source pointer", ram('h44), 16'h003B);
    expect_eq("destination pointer", ram('h45), 16'h0053);
    expect_eq("count", ram('h46), 16'h0000);
    expect_eq("result of two calls", ram('h47), 16'h0002);
    expect_eq("cycles to the final jump", 16'(run_cycles), 16'(CYCLES));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
