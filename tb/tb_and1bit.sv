// tb_and1bit: exhaustive check of the and1bit cell: all four input pairs against the logical AND.
// Combinational, no clock.
module tb_and1bit;
  logic x;
  logic y;
  logic z;
  logic [1:0] v;
  int checks = 0, failures = 0;

  and1bit dut (.x(x), .y(y), .z(z));

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
      if (z !== (x && y)) begin
        failures++;
        $display("FAIL v=%b z=%b", v, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
