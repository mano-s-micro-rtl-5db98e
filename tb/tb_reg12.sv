// tb_reg12: random clear / load / increment traffic on reg12, compared after
// each rising edge with a model (clear beats load beats increment). The
// model keeps only the bits the register holds (mask 16'h0FFF), so the upper
// data bits are ignored and increments wrap within the register's width.
module tb_reg12;
  logic clk = 0, inc, clr, load;
  logic [15:0] data, q, model;
  int checks = 0, failures = 0, cycles = 0;

  reg12 dut (.inc(inc), .data(data), .clr(clr), .load(load), .clk(clk), .q(q));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 5000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    inc = 0; load = 0; clr = 1; data = '0; model = '0;
    @(negedge clk);
    clr = 0;
    for (int n = 0; n < 2000; n++) begin
      int r;
      r = $urandom_range(0, 15);
      clr  = (r == 0);
      load = (r == 1);
      inc  = (r >= 2) || ($urandom_range(0, 1) == 1);
      data = 16'($urandom);
      if (n % 500 == 3) begin clr = 0; load = 1; inc = 0; data = 16'hFFFF; end
      if (clr)       model = '0;
      else if (load) model = data & 16'h0FFF;
      else if (inc)  model = (model + 16'd1) & 16'h0FFF;
      @(negedge clk);
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL n=%0d q=%h expected %h", n, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
