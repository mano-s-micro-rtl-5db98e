// tb_reg1: the one-bit register cell with mutually exclusive clr / ld / cin
// (as its enclosing register drives it): clr gives 0, ld gives data, cin
// toggles, none holds. Also checks qbar and the combinational carry
// cout = q & cin.
module tb_reg1;
  logic clk = 0, cin, data, clr, ld, q, qbar, cout, model;
  int checks = 0, failures = 0, cycles = 0;

  reg1 dut (.cin(cin), .data(data), .clr(clr), .ld(ld), .clk(clk), .q(q), .qbar(qbar), .cout(cout));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 2000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    cin = 0; ld = 0; clr = 1; data = 0; model = 0;
    @(negedge clk);
    for (int n = 0; n < 500; n++) begin
      int op;
      op = $urandom_range(0, 3);
      {clr, ld, cin} = 3'b000;
      case (op)
        0: clr = 1;
        1: ld = 1;
        2: cin = 1;
        default: ;
      endcase
      data = 1'($urandom);
      #1;
      checks++;
      if (cout !== (q & cin)) begin failures++; $display("FAIL cout n=%0d", n); end
      case (op)
        0: model = 0;
        1: model = data;
        2: model = ~model;
        default: ;
      endcase
      @(negedge clk);
      checks++;
      if (q !== model || qbar !== ~model) begin
        failures++;
        $display("FAIL n=%0d op=%0d q=%b expected %b", n, op, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
