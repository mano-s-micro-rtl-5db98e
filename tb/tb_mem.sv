// tb_mem: the two-unit memory. Reads below address bit 6 must return the
// ROM program; writes there must be ignored. Writes with bit 6 set must land
// in the RAM and read back, including through aliases that differ only in
// the undecoded address bits 11..7.
module tb_mem;
  import mano_pkg::*;
  logic  clk = 0, we;
  word_t data, q;
  addr_t a;
  word_t model [64];
  logic  valid [64];
  int checks = 0, failures = 0, cycles = 0, rom_writes = 0;

  mem dut (.data(data), .address(a), .we(we), .clock(clk), .q(q));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 5000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  function automatic word_t rom_word(int n);
    case (n)
      0: return 16'h2040;
      1: return 16'h7020;
      2: return 16'hF400;
      3: return 16'h3040;
      4: return 16'h7800;
      default: return 16'h4000;
    endcase
  endfunction

  initial begin
    we = 0; a = '0; data = '0;
    for (int n = 0; n < 64; n++) valid[n] = 1'b0;
    @(negedge clk);
    for (int n = 0; n < 3000; n++) begin
      a = 12'($urandom); data = 16'($urandom); we = 1'($urandom);
      #1;
      checks++;
      if (!a[6]) begin
        if (q !== rom_word(int'(a[5:0]))) begin
          failures++;
          $display("FAIL rom read %h = %h", a, q);
        end
        if (we) rom_writes++;
      end else if (valid[a[5:0]]) begin
        if (q !== model[a[5:0]]) begin
          failures++;
          $display("FAIL ram read %h = %h expected %h", a, q, model[a[5:0]]);
        end
      end else checks--;
      if (we && a[6]) begin model[a[5:0]] = data; valid[a[5:0]] = 1'b1; end
      @(negedge clk);
    end
    checks++;
    if (rom_writes == 0) begin failures++; $display("FAIL no ROM write attempted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
