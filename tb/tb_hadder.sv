// tb_hadder: exhaustive check of the hadder cell: all four input pairs against integer addition.
// Combinational, no clock.
module tb_hadder;
  logic x;
  logic y;
  logic s;
  logic c;
  logic [1:0] v;
  int checks = 0, failures = 0;

  hadder dut (.x(x), .y(y), .s(s), .c(c));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4; n++) begin
      v = 2'(n);
      y = v[0]; x = v[1];
      #1;
      checks++;
      if (s !== (1'(x + y))) begin
        failures++;
        $display("FAIL v=%b s=%b", v, s);
      end
      checks++;
      if (c !== (1'((2'(x) + 2'(y)) >> 1))) begin
        failures++;
        $display("FAIL v=%b c=%b", v, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
