// tb_dec1x2e: exhaustive check of the dec1x2e cell: all select/enable pairs; o is one-hot at sel when enabled, zero otherwise.
// Combinational, no clock.
module tb_dec1x2e;
  logic sel;
  logic en;
  logic [1:0] o;
  logic [1:0] v;
  int checks = 0, failures = 0;

  dec1x2e dut (.sel(sel), .en(en), .o(o));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4; n++) begin
      v = 2'(n);
      en = v[0]; sel = v[1];
      #1;
      checks++;
      if (o !== (en ? 2'(1 << sel) : 2'b00)) begin
        failures++;
        $display("FAIL v=%b o=%b", v, o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
