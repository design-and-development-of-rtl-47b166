// branch_cond: the "=0" unit of the execute stage. It tests operand A (the
// forwarded value of rs) for zero and turns the result into the condition
// bit stored as EX_MEM cond: BEQZ is taken when A is zero, BNEQZ when it is
// not, and the unconditional J always. Any other opcode gives 0.
// Combinational. The zero test on A feeding EX_MEM is the documented
// structure; the J case is this design's way of reusing the same redirect.
//   a_i : operand A    op_i : opcode of the instruction in EX    cond_o
module branch_cond
  import mips_pkg::*;
(
  input  word_t      a_i,
  input  logic [5:0] op_i,
  output logic       cond_o
);
  logic zero;
  always_comb begin
    zero = (a_i == '0);
    unique case (op_i)
      OP_BEQZ : cond_o = zero;
      OP_BNEQZ: cond_o = !zero;
      OP_J    : cond_o = 1'b1;
      default : cond_o = 1'b0;
    endcase
  end
endmodule
