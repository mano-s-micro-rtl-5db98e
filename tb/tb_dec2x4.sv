// tb_dec2x4: exhaustive check of the dec2x4 cell: all four select values; o must be one-hot at position sel.
// Combinational, no clock.
module tb_dec2x4;
  logic [1:0] sel;
  logic [3:0] o;
  logic [1:0] v;
  int checks = 0, failures = 0;

  dec2x4 dut (.sel(sel), .o(o));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4; n++) begin
      v = 2'(n);
      sel = v[1:0];
      #1;
      checks++;
      if (o !== (4'(1 << sel))) begin
        failures++;
        $display("FAIL v=%b o=%b", v, o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
