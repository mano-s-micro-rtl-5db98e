// tb_dec4x16: exhaustive check of the 4-to-16 decoder: for every select
// value exactly output line sel is high. Combinational, no clock.
module tb_dec4x16;
  logic [3:0]  sel;
  logic [15:0] o;
  int checks = 0, failures = 0;

  dec4x16 dut (.sel(sel), .o(o));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 16; s++) begin
      sel = 4'(s);
      #1;
      checks++;
      if (o !== 16'(1 << s)) begin
        failures++;
        $display("FAIL sel=%0d o=%b", s, o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
