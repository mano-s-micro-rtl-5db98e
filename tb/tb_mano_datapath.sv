// tb_mano_datapath: drives the datapath's control lines directly, one
// micro-operation per clock, and checks the registers it exposes (PC, AC,
// OTR, E, IR, DR and the flags) against values worked out by hand: loads
// over the bus from every source, increments and clears, ALU pass/AND/ADD
// (with carry into E), a RAM write and read-back, an ignored write to ROM,
// and the set/clear of R, IEN, FGI and FGO.
module tb_mano_datapath;
  import mano_pkg::*;
  logic    clk = 0, rst, fgi_set, fgo_set, e;
  ctrl_t   c;
  status_t st;
  word_t   pc, ac, ot;
  int checks = 0, failures = 0, cycles = 0;

  mano_datapath dut (.clk(clk), .rst(rst), .ctrl(c), .fgi_set(fgi_set), .fgo_set(fgo_set),
                     .status(st), .pc(pc), .ac(ac), .ot(ot), .e(e));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 1000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  function automatic ctrl_t idle();
    ctrl_t x = '0;
    x.alu_fn = ALU_PASS; x.bus_sel = BUS_DR;
    return x;
  endfunction

  task automatic step(input ctrl_t x);
    c = x;
    @(negedge clk);
    c = idle();
  endtask

  task automatic expect_eq(input string what, input logic [15:0] got, input logic [15:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s = %h, expected %h", what, got, want);
    end
  endtask

  initial begin
    ctrl_t x;
    c = idle(); fgi_set = 0; fgo_set = 0; rst = 1;
    @(negedge clk); @(negedge clk);
    rst = 0;
    expect_eq("pc after reset", pc, 0);
    expect_eq("ac after reset", ac, 0);
    expect_eq("ot after reset", ot, 0);
    expect_eq("dr after reset", st.dr, 0);
    expect_eq("flags after reset", {st.r, st.ien, st.fgi, st.fgo, e}, 0);

    // AR <- M[0] = 0x2040 (12 bits kept), then DR <- AR
    x = idle(); x.bus_sel = BUS_MEM; x.ar.ld = 1; step(x);
    x = idle(); x.bus_sel = BUS_AR;  x.dr.ld = 1; step(x);
    expect_eq("dr <- ar", st.dr, 16'h0040);
    // M[0x40] <- DR, then IR <- M[0x40]
    x = idle(); x.bus_sel = BUS_DR; x.mem_wr = 1; step(x);
    x = idle(); x.bus_sel = BUS_MEM; x.ir.ld = 1; step(x);
    expect_eq("ir <- ram", st.ir, 16'h0040);
    // PC += 3, TR <- PC, DR <- TR
    x = idle(); x.pc.inc = 1; step(x); step(x); step(x);
    expect_eq("pc inc", pc, 16'h0003);
    x = idle(); x.bus_sel = BUS_PC; x.tr.ld = 1; step(x);
    x = idle(); x.bus_sel = BUS_TR; x.dr.ld = 1; step(x);
    expect_eq("dr <- tr <- pc", st.dr, 16'h0003);
    // PC <- IR (12 bits)
    x = idle(); x.bus_sel = BUS_IR; x.pc.ld = 1; step(x);
    expect_eq("pc <- ir", pc, 16'h0040);
    // AC <- DR (pass), AC+1, AC <- AC + DR, AC <- AC & DR
    x = idle(); x.ac.ld = 1; step(x);
    expect_eq("ac pass", ac, 16'h0003);
    x = idle(); x.ac.inc = 1; step(x);
    expect_eq("ac inc", ac, 16'h0004);
    x = idle(); x.ac.ld = 1; x.alu_fn = ALU_ADD; step(x);
    expect_eq("ac add", ac, 16'h0007);
    expect_eq("e after small add", 16'(e), 0);
    x = idle(); x.ac.ld = 1; x.alu_fn = ALU_AND; step(x);
    expect_eq("ac and", ac, 16'h0003);
    // DR <- M[2] = 0xF400 (AR cleared, incremented twice), AC <- DR, AC <- AC + DR
    x = idle(); x.ar.clr = 1; step(x);
    x = idle(); x.ar.inc = 1; step(x); step(x);
    x = idle(); x.bus_sel = BUS_MEM; x.dr.ld = 1; step(x);
    expect_eq("dr <- rom[2]", st.dr, 16'hF400);
    x = idle(); x.ac.ld = 1; step(x);
    x = idle(); x.ac.ld = 1; x.alu_fn = ALU_ADD; step(x);
    expect_eq("ac add carry", ac, 16'hE800);
    expect_eq("e carry", 16'(e), 1);
    // OTR <- AC; DR <- AC; AC cleared
    x = idle(); x.bus_sel = BUS_AC; x.ot.ld = 1; step(x);
    expect_eq("ot <- ac", ot, 16'hE800);
    x = idle(); x.ac.clr = 1; step(x);
    expect_eq("ac clr", ac, 0);
    // Write to ROM (AR = 2) is ignored
    x = idle(); x.bus_sel = BUS_AC; x.mem_wr = 1; step(x);
    x = idle(); x.bus_sel = BUS_MEM; x.dr.ld = 1; step(x);
    expect_eq("rom unchanged", st.dr, 16'hF400);
    // DR increment and clear
    x = idle(); x.dr.inc = 1; step(x);
    expect_eq("dr inc", st.dr, 16'hF401);
    // Flags
    fgi_set = 1; @(negedge clk); fgi_set = 0;
    expect_eq("fgi set", 16'(st.fgi), 1);
    fgo_set = 1; @(negedge clk); fgo_set = 0;
    expect_eq("fgo set", 16'(st.fgo), 1);
    x = idle(); x.fgik = 1; step(x);
    expect_eq("fgi clr", {st.fgi, st.fgo}, 16'b01);
    x = idle(); x.fgok = 1; step(x);
    expect_eq("fgo clr", 16'(st.fgo), 0);
    x = idle(); x.ienj = 1; x.rj = 1; step(x);
    expect_eq("ien r set", {st.ien, st.r}, 16'b11);
    x = idle(); x.ienk = 1; x.rk = 1; step(x);
    expect_eq("ien r clr", {st.ien, st.r}, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
