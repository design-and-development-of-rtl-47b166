// data_mem: the data memory (DM), a word-addressed array of DEPTH 32-bit words.
// The memory stage uses port A: ALUOut is the address, loads read
// combinationally (the value is captured as LMD in MEM_WB) and stores write
// the forwarded rt value on the rising edge. Port B is a host port for loading
// input data and reading results; it has the same timing. If both ports write
// the same word in one cycle, port A wins. Only the low log2(DEPTH) address
// bits are used. The depth and the host port are this design's choices.
module data_mem
  import mips_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic  clk,
  input  word_t a_addr_i,
  input  logic  a_we_i,
  input  word_t a_wdata_i,
  output word_t a_rdata_o,
  input  word_t b_addr_i,
  input  logic  b_we_i,
  input  word_t b_wdata_i,
  output word_t b_rdata_o
);
  localparam int unsigned AW = $clog2(DEPTH);

  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (b_we_i) mem[b_addr_i[AW-1:0]] <= b_wdata_i;
    if (a_we_i) mem[a_addr_i[AW-1:0]] <= a_wdata_i;
  end

  always_comb begin
    a_rdata_o = mem[a_addr_i[AW-1:0]];
    b_rdata_o = mem[b_addr_i[AW-1:0]];
  end
endmodule
