// pipe_reg: one pipeline buffer (IF_ID, ID_EX, EX_MEM or MEM_WB). On each
// rising edge it captures the bundle T produced by the stage before it,
// unless hold_i keeps the current contents (a stall) or flush_i loads the
// empty bundle BUBBLE (a squashed instruction or an inserted bubble). Flush
// wins over hold. Reset loads BUBBLE. The bundle types are the structs of
// mips_pkg; every one has a valid bit that is 0 in BUBBLE, which is what
// stops a squashed instruction from writing the register file or memory.
module pipe_reg #(
  parameter type T      = logic [31:0],
  parameter T    BUBBLE = '0
) (
  input  logic clk,
  input  logic rst,
  input  logic hold_i,
  input  logic flush_i,
  input  T     d_i,
  output T     q_o
);
  always_ff @(posedge clk) begin
    if (rst || flush_i) q_o <= BUBBLE;
    else if (!hold_i)   q_o <= d_i;
  end
endmodule
