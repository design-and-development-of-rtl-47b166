// fetch_unit: the instruction-fetch datapath: the program counter, the +1
// incrementer and the multiplexer that picks the next PC. The PC is a word
// address, so the next sequential instruction is PC + 1 (npc_o, passed down
// the pipeline as NPC). When the memory stage reports a taken branch or jump
// (take_i) the PC is loaded with its target (the EX_MEM ALUOut); when the
// hazard unit stalls or the processor is halted (hold_i) the PC keeps its
// value. take_i has priority over hold_i. Synchronous active-high reset sets
// the PC to RESET_PC.
module fetch_unit
  import mips_pkg::*;
#(
  parameter word_t RESET_PC = '0
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  take_i,
  input  word_t target_i,
  input  logic  hold_i,
  output word_t pc_o,
  output word_t npc_o
);
  always_comb npc_o = pc_o + word_t'(1);

  always_ff @(posedge clk) begin
    if (rst)          pc_o <= RESET_PC;
    else if (take_i)  pc_o <= target_i;
    else if (!hold_i) pc_o <= npc_o;
  end
endmodule
