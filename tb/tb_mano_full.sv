// tb_mano_full: the complete computer at its default configuration running
// its built-in program, the counting loop (LDA $40, INC, OUT, STA $40, CLA,
// BUN 0). The starting value v of RAM word $40 is whatever the RAM powers up
// with; pass k of the loop must put v+k on the output register (OUT copies
// DR, the value just loaded) and leave v+k+1 in word $40. Every pass must
// take 28 clock cycles: LDA 6, INC 4, OUT 4, STA 5, CLA 4, BUN 5. During
// OUT the accumulator must hold v+k+1.
module tb_mano_full;
  import mano_pkg::*;
  localparam int PASSES = 40;
  logic clk = 0, rst, e, sc_clr, mwrite;
  logic [15:0] ot, pc, ac, dr, ir;
  logic [2:0]  alu_fn;
  int checks = 0, failures = 0, cycles = 0, outs = 0, last_out_cycle = -1;
  word_t v;

  mano_top dut (.clk(clk), .rst(rst), .fgi_set(1'b0), .fgo_set(1'b0), .ot(ot), .pc(pc),
                .ac(ac), .dr(dr), .ir(ir), .e(e), .sc_clr(sc_clr), .mwrite(mwrite), .alu_fn(alu_fn));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 28 * PASSES + 200) begin
      failures++;
      $display("FAIL watchdog: %0d outputs", outs);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // Each OUT: one cycle after the output register is loaded, compare.
  always @(negedge clk) begin
    if (!rst && dut.ctrl.ot.ld) begin
      // during OUT, AC holds the incremented value that STA will store
      checks++;
      if (ac !== 16'(v + outs + 1)) begin
        failures++;
        $display("FAIL pass %0d: AC = %h during OUT, expected %h", outs, ac, 16'(v + outs + 1));
      end
      @(negedge clk);
      checks++;
      if (ot !== 16'(v + outs)) begin
        failures++;
        $display("FAIL pass %0d: ot = %h, expected %h", outs, ot, 16'(v + outs));
      end
      if (last_out_cycle >= 0) begin
        checks++;
        if (cycles - last_out_cycle != 28) begin
          failures++;
          $display("FAIL pass %0d took %0d cycles, expected 28", outs, cycles - last_out_cycle);
        end
      end
      last_out_cycle = cycles;
      outs++;
    end
  end

  initial begin
    rst = 1;
    repeat (2) @(negedge clk);
    v = dut.u_dp.u_mem.u_ram.mem_q[0];
    rst = 0;
    wait (outs == PASSES);
    repeat (30) @(negedge clk);
    checks++;
    if (dut.u_dp.u_mem.u_ram.mem_q[0] !== 16'(v + PASSES)) begin
      failures++;
      $display("FAIL M[$40] = %h, expected %h", dut.u_dp.u_mem.u_ram.mem_q[0], 16'(v + PASSES));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
