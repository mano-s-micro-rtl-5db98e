// tb_dec2x4e: exhaustive check of the dec2x4e cell: all select/enable combinations; one-hot at sel when enabled, zero otherwise.
// Combinational, no clock.
module tb_dec2x4e;
  logic [1:0] sel;
  logic en;
  logic [3:0] o;
  logic [2:0] v;
  int checks = 0, failures = 0;

  dec2x4e dut (.sel(sel), .en(en), .o(o));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 8; n++) begin
      v = 3'(n);
      en = v[0]; sel = v[2:1];
      #1;
      checks++;
      if (o !== (en ? 4'(1 << sel) : 4'b0000)) begin
        failures++;
        $display("FAIL v=%b o=%b", v, o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
