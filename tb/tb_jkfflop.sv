// tb_jkfflop: drives random J/K pairs into the JK flip-flop and compares Q
// and Qbar after every rising edge with a hold/reset/set/toggle model.
module tb_jkfflop;
  logic clk = 0, j, k, q, qbar, model;
  int checks = 0, failures = 0, cycles = 0;

  jkfflop dut (.j(j), .k(k), .clk(clk), .q(q), .qbar(qbar));

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
    // bring the flop to a known 0 first
    j = 0; k = 1; model = 0;
    @(negedge clk);
    for (int n = 0; n < 400; n++) begin
      j = 1'($urandom); k = 1'($urandom);
      if (n < 4) {j, k} = 2'(n);   // make sure all four cases occur
      case ({j, k})
        2'b00: model = model;
        2'b01: model = 1'b0;
        2'b10: model = 1'b1;
        2'b11: model = ~model;
      endcase
      @(negedge clk);
      checks++;
      if (q !== model || qbar !== ~model) begin
        failures++;
        $display("FAIL n=%0d j=%b k=%b q=%b qbar=%b expected %b", n, j, k, q, qbar, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
