// ram: memory unit 1, a 64 x 16-bit random-access memory. Writes happen on
// the rising clock edge when we is high; reads are combinational, so data
// at the address held in AR is on q in the same cycle. The original design
// took this part from its FPGA vendor's library; only its size and port
// list are its own, and the asynchronous read is this implementation's
// choice (the controller's timing reads memory in the cycle after AR is
// loaded). The contents are not reset.
module ram
  import mano_pkg::*;
(
  input  word_t     data,
  input  mem_addr_t address,
  input  logic      we,
  input  logic      clock,
  output word_t     q
);
  word_t mem_q [MEM_UNIT_WORDS];

  always_ff @(posedge clock) begin
    if (we) mem_q[address] <= data;
  end

  assign q = mem_q[address];
endmodule
