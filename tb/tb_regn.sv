// tb_regn: random clear / load / increment traffic on an 8-bit regn,
// compared after each rising edge with an integer model (clear beats load
// beats increment). Also checks qbar and the carry out of the top bit.
module tb_regn;
  localparam int N = 8;
  logic clk = 0, inc, clr, load, cout;
  logic [N-1:0] data, q, qbar, model;
  int checks = 0, failures = 0, cycles = 0, wraps = 0;

  regn #(.N(N)) dut (.inc(inc), .data(data), .clr(clr), .load(load), .clk(clk),
                     .q(q), .qbar(qbar), .cout(cout));

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
      load = (r == 1) || (r == 2 && n % 2 == 0);
      inc  = (r >= 2) || ($urandom_range(0, 1) == 1);
      data = N'($urandom);
      if (n % 300 == 0) begin clr = 0; load = 1; inc = 0; data = '1; end  // all ones ...
      if (n % 300 == 1) begin clr = 0; load = 0; inc = 1; end              // ... then wrap
      #1;
      // carry out is combinational: all ones and a pure increment
      checks++;
      if (cout !== (inc & ~load & ~clr & (q == '1))) begin
        failures++;
        $display("FAIL cout n=%0d", n);
      end
      if (inc & ~load & ~clr & (q == '1)) wraps++;
      if (clr)       model = '0;
      else if (load) model = data;
      else if (inc)  model = model + 1'b1;
      @(negedge clk);
      checks++;
      if (q !== model || qbar !== ~model) begin
        failures++;
        $display("FAIL n=%0d q=%h expected %h", n, q, model);
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL no wrap seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
