// tb_dfflop: random data into the D flip-flop; after each rising edge Q must
// equal the D sampled at that edge, and it must hold while D changes between
// edges.
module tb_dfflop;
  logic clk = 0, d, q, sampled;
  int checks = 0, failures = 0, cycles = 0;

  dfflop dut (.d(d), .clk(clk), .q(q));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 2000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    d = 0;
    @(negedge clk);
    for (int n = 0; n < 300; n++) begin
      d = 1'($urandom);
      sampled = d;
      @(negedge clk);
      checks++;
      if (q !== sampled) begin failures++; $display("FAIL n=%0d q=%b expected %b", n, q, sampled); end
      d = ~d; #1;     // change D away from the clock edge: Q must hold
      checks++;
      if (q !== sampled) begin failures++; $display("FAIL hold n=%0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
