// tb_rom: reads all 64 words of the ROM with its default contents and
// compares them with the counting-loop program written out here as
// instruction words: LDA $40, INC, OUT, STA $40, CLA, then BUN 0.
module tb_rom;
  import mano_pkg::*;
  mem_addr_t a;
  word_t     q, expected;
  int checks = 0, failures = 0;

  rom dut (.address(a), .q(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 64; n++) begin
      a = 6'(n);
      case (n)
        0: expected = 16'h2040;
        1: expected = 16'h7020;
        2: expected = 16'hF400;
        3: expected = 16'h3040;
        4: expected = 16'h7800;
        default: expected = 16'h4000;
      endcase
      #1;
      checks++;
      if (q !== expected) begin
        failures++;
        $display("FAIL rom[%0d]=%h expected %h", n, q, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
