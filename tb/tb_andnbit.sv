// tb_andnbit: the 16-bit bitwise AND against the & operator on walking-one
// and random operands.
module tb_andnbit;
  logic [15:0] x, y, s;
  int checks = 0, failures = 0;

  andnbit #(.N(16)) dut (.x(x), .y(y), .s(s));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      if (n < 16) begin x = 16'hFFFF; y = 16'(1 << n); end
      else begin x = 16'($urandom); y = 16'($urandom); end
      #1;
      checks++;
      if (s !== (x & y)) begin
        failures++;
        $display("FAIL %h & %h = %h", x, y, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
