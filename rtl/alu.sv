// alu: the execute-stage arithmetic logic unit. It applies the "Execute
// Command" chosen by the control unit to two 32-bit operands: ADD, SUB, AND,
// OR, NOR, XOR, logical shifts left and right, arithmetic shift right, and MUL
// (low 32 bits of the product; the factorial reference program needs it).
// Shifts move operand a by the amount in b[4:0]. Purely combinational, so
// the result is ready in the same cycle and is registered as ALUOut in the
// EX_MEM buffer. The operation list follows the processor description; the
// 4-bit command encoding (mips_pkg::alu_op_e) is this design's own.
//   a_i, b_i : operands      op_i : command      y_o : result
module alu
  import mips_pkg::*;
(
  input  word_t   a_i,
  input  word_t   b_i,
  input  alu_op_e op_i,
  output word_t   y_o
);
  always_comb begin
    unique case (op_i)
      ALU_ADD: y_o = a_i + b_i;
      ALU_SUB: y_o = a_i - b_i;
      ALU_AND: y_o = a_i & b_i;
      ALU_OR : y_o = a_i | b_i;
      ALU_NOR: y_o = ~(a_i | b_i);
      ALU_XOR: y_o = a_i ^ b_i;
      ALU_SLL: y_o = a_i << b_i[4:0];
      ALU_SRL: y_o = a_i >> b_i[4:0];
      ALU_SRA: y_o = word_t'($signed(a_i) >>> b_i[4:0]);
      ALU_MUL: y_o = a_i * b_i;
      default: y_o = '0;
    endcase
  end
endmodule
