// tb_alu: every ALU function on corner and random operands, against a
// behavioural model written with SystemVerilog operators: pass D0, AND, ADD
// with carry to E, complement of D0, rotate right/left of D0 through E, and
// zero for the unused codes.
module tb_alu;
  import mano_pkg::*;
  logic    ein, e;
  word_t   d0, d1, q;
  alu_fn_e fn;
  int checks = 0, failures = 0;

  alu dut (.ein(ein), .d0(d0), .d1(d1), .fn(fn), .e(e), .q(q));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [16:0] exp_full;
      logic [2:0]  code;
      code = 3'(n % 8);
      fn  = alu_fn_e'(code);
      d0  = (n < 16) ? 16'hFFFF : 16'($urandom);
      d1  = (n < 16) ? 16'h0001 : 16'($urandom);
      ein = 1'($urandom);
      #1;
      case (code)
        3'd0: exp_full = {1'b0, d0};
        3'd1: exp_full = {1'b0, d0 & d1};
        3'd2: exp_full = {1'b0, d0} + {1'b0, d1};
        3'd3: exp_full = {1'b0, ~d0};
        3'd4: exp_full = {d0[0], ein, d0[15:1]};
        3'd5: exp_full = {d0[15], d0[14:0], ein};
        default: exp_full = '0;
      endcase
      checks++;
      if ({e, q} !== exp_full) begin
        failures++;
        $display("FAIL fn=%0d d0=%h d1=%h ein=%b -> e=%b q=%h expected %h", code, d0, d1, ein, e, q, exp_full);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
