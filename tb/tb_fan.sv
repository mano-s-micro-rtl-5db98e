// tb_fan: the 16-bit ripple adder against integer addition, with corner
// cases (carry through all bits) and random operands; checks sum and carry.
module tb_fan;
  logic [15:0] x, y, s;
  logic        cout;
  int checks = 0, failures = 0;

  fan #(.N(16)) dut (.x(x), .y(y), .s(s), .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [15:0] a, input logic [15:0] b);
    logic [16:0] sum;
    x = a; y = b; #1;
    sum = {1'b0, a} + {1'b0, b};
    checks++;
    if ({cout, s} !== sum) begin
      failures++;
      $display("FAIL %h + %h = %b_%h expected %h", a, b, cout, s, sum);
    end
  endtask

  initial begin
    check(16'h0000, 16'h0000);
    check(16'hFFFF, 16'h0001);
    check(16'h8000, 16'h8000);
    check(16'h7FFF, 16'h0001);
    check(16'hFFFF, 16'hFFFF);
    for (int n = 0; n < 2000; n++) check(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
