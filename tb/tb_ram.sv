// tb_ram: fills the 64-word RAM, then mixes random writes and reads, and
// compares every read (combinational, same cycle as the address) with a
// scoreboard array. Also checks that we = 0 leaves the word unchanged.
module tb_ram;
  import mano_pkg::*;
  logic      clk = 0, we;
  word_t     data, q;
  mem_addr_t a;
  word_t     model [64];
  int checks = 0, failures = 0, cycles = 0;

  ram dut (.data(data), .address(a), .we(we), .clock(clk), .q(q));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 5000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    we = 0; a = '0; data = '0;
    @(negedge clk);
    for (int n = 0; n < 64; n++) begin
      a = 6'(n); data = 16'($urandom); we = 1; model[n] = data;
      @(negedge clk);
    end
    for (int n = 0; n < 2000; n++) begin
      a = 6'($urandom); data = 16'($urandom); we = 1'($urandom);
      #1;
      checks++;
      if (q !== model[a]) begin
        failures++;
        $display("FAIL read [%0d]=%h expected %h", a, q, model[a]);
      end
      if (we) model[a] = data;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
