// tb_fa1: exhaustive check of the fa1 cell: all eight input triples against integer addition.
// Combinational, no clock.
module tb_fa1;
  logic x;
  logic y;
  logic z;
  logic s;
  logic c;
  logic [2:0] v;
  int checks = 0, failures = 0;

  fa1 dut (.x(x), .y(y), .z(z), .s(s), .c(c));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 8; n++) begin
      v = 3'(n);
      z = v[0]; y = v[1]; x = v[2];
      #1;
      checks++;
      if (s !== (1'(x + y + z))) begin
        failures++;
        $display("FAIL v=%b s=%b", v, s);
      end
      checks++;
      if (c !== (1'((2'(x) + 2'(y) + 2'(z)) >> 1))) begin
        failures++;
        $display("FAIL v=%b c=%b", v, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
