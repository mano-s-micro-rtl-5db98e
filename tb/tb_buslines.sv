// tb_buslines: puts a distinct random value on every bus source and checks
// that each select code passes the right one, and code 0 gives all ones.
module tb_buslines;
  import mano_pkg::*;
  word_t ar, pc, dr, ac, ir, tr, memory, q, expected;
  bus_sel_e sel;
  int checks = 0, failures = 0;

  buslines dut (.ar(ar), .pc(pc), .dr(dr), .ac(ac), .ir(ir), .tr(tr), .memory(memory),
                .sel(sel), .q(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      ar = 16'($urandom); pc = 16'($urandom); dr = 16'($urandom); ac = 16'($urandom);
      ir = 16'($urandom); tr = 16'($urandom); memory = 16'($urandom);
      sel = bus_sel_e'(3'(n % 8));
      case (n % 8)
        1: expected = ar;
        2: expected = pc;
        3: expected = dr;
        4: expected = ac;
        5: expected = ir;
        6: expected = tr;
        7: expected = memory;
        default: expected = 16'hFFFF;
      endcase
      #1;
      checks++;
      if (q !== expected) begin
        failures++;
        $display("FAIL sel=%0d q=%h expected %h", n % 8, q, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
