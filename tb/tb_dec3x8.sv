// tb_dec3x8: exhaustive check of the 3-to-8 decoder: for every select value
// exactly output line sel is high. Combinational, no clock.
module tb_dec3x8;
  logic [2:0] sel;
  logic [7:0] o;
  int checks = 0, failures = 0;

  dec3x8 dut (.sel(sel), .o(o));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 8; s++) begin
      sel = 3'(s);
      #1;
      checks++;
      if (o !== 8'(1 << s)) begin
        failures++;
        $display("FAIL sel=%0d o=%b", s, o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
