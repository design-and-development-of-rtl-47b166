// instr_mem: the instruction memory (IM) of the Harvard organisation, a word-
// addressed array of DEPTH 32-bit instructions. The fetch stage reads it
// combinationally at the program counter; the instruction is captured as IR in
// the IF_ID buffer at the next clock edge. A synchronous write port loads the
// program before the processor is released from reset. Addresses are word
// addresses (the PC steps by one), and only the low log2(DEPTH) bits are used.
// The depth of 1024 words is this design's choice.
module instr_mem
  import mips_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic  clk,
  input  word_t addr_i,
  output word_t instr_o,
  input  logic  we_i,
  input  word_t waddr_i,
  input  word_t wdata_i
);
  localparam int unsigned AW = $clog2(DEPTH);

  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_i) mem[waddr_i[AW-1:0]] <= wdata_i;
  end

  always_comb instr_o = mem[addr_i[AW-1:0]];
endmodule
