// tb_dec1x2: exhaustive check of the dec1x2 cell: both select values; o must be one-hot at position sel.
// Combinational, no clock.
module tb_dec1x2;
  logic sel;
  logic [1:0] o;
  logic [0:0] v;
  int checks = 0, failures = 0;

  dec1x2 dut (.sel(sel), .o(o));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2; n++) begin
      v = 1'(n);
      sel = v[0];
      #1;
      checks++;
      if (o !== (2'(1 << sel))) begin
        failures++;
        $display("FAIL v=%b o=%b", v, o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
