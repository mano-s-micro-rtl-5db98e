// tb_timer16: the sequence timer must give exactly one timing line, advance
// by one line per clock, wrap from T15 to T0, and return to T0 in the cycle
// after clr. clr is applied at random points and after a full wrap.
module tb_timer16;
  logic clk = 0, clr;
  logic [15:0] o;
  int checks = 0, failures = 0, cycles = 0, model, wraps = 0;

  timer16 dut (.clk(clk), .clr(clr), .o(o));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 3000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    clr = 1;
    @(negedge clk);
    model = 0;
    for (int n = 0; n < 1000; n++) begin
      checks++;
      if (o !== 16'(1 << model)) begin
        failures++;
        $display("FAIL n=%0d o=%b expected T%0d", n, o, model);
      end
      clr = (n > 40) && ($urandom_range(0, 9) == 0);
      if (clr) model = 0;
      else begin
        if (model == 15) wraps++;
        model = (model + 1) % 16;
      end
      @(negedge clk);
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL no wrap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
