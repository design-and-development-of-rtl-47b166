// control_unit: the decode-stage controller. From the 6-bit opcode of the
// instruction in IF_ID it produces the instruction type that travels down the
// pipeline, the ALU "Execute Command", the operand-B selection (register,
// immediate or shift amount), which source registers are read (used by the
// forwarding and stall logic), the register-write and memory-read/write
// enables, and whether the destination is rd (R type) or rt (I type).
// Undefined opcodes decode to T_NONE with every enable low, so they act as
// no-ops. Combinational.
// Opcode values for ADD, OR, MUL, LW, SW, ADDI, SUBI, BNEQZ and HLT and the
// type numbering 0..5 match the reference machine code; the remaining
// opcodes are this design's assignment (see mips_pkg).
module control_unit
  import mips_pkg::*;
(
  input  logic [5:0] op_i,
  output ctrl_t      ctrl_o
);
  always_comb begin
    ctrl_o = '{itype: T_NONE, alu_op: ALU_ADD, default: 1'b0};
    unique case (op_i)
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_MUL, OP_NOR, OP_XOR: begin
        ctrl_o.itype     = T_RR_ALU;
        ctrl_o.reads_rs  = 1'b1;
        ctrl_o.reads_rt  = 1'b1;
        ctrl_o.reg_write = 1'b1;
        ctrl_o.dest_rd   = 1'b1;
        unique case (op_i)
          OP_SUB : ctrl_o.alu_op = ALU_SUB;
          OP_AND : ctrl_o.alu_op = ALU_AND;
          OP_OR  : ctrl_o.alu_op = ALU_OR;
          OP_MUL : ctrl_o.alu_op = ALU_MUL;
          OP_NOR : ctrl_o.alu_op = ALU_NOR;
          OP_XOR : ctrl_o.alu_op = ALU_XOR;
          default: ctrl_o.alu_op = ALU_ADD;
        endcase
      end
      OP_SLL, OP_SRL, OP_SRA: begin
        ctrl_o.itype     = T_RR_ALU;
        ctrl_o.reads_rs  = 1'b1;
        ctrl_o.use_shamt = 1'b1;
        ctrl_o.reg_write = 1'b1;
        ctrl_o.dest_rd   = 1'b1;
        ctrl_o.alu_op    = (op_i == OP_SLL) ? ALU_SLL :
                           (op_i == OP_SRL) ? ALU_SRL : ALU_SRA;
      end
      OP_ADDI, OP_SUBI: begin
        ctrl_o.itype     = T_RM_ALU;
        ctrl_o.reads_rs  = 1'b1;
        ctrl_o.use_imm   = 1'b1;
        ctrl_o.reg_write = 1'b1;
        ctrl_o.alu_op    = (op_i == OP_SUBI) ? ALU_SUB : ALU_ADD;
      end
      OP_LW: begin
        ctrl_o.itype     = T_LOAD;
        ctrl_o.reads_rs  = 1'b1;
        ctrl_o.use_imm   = 1'b1;
        ctrl_o.reg_write = 1'b1;
        ctrl_o.mem_read  = 1'b1;
      end
      OP_SW: begin
        ctrl_o.itype     = T_STORE;
        ctrl_o.reads_rs  = 1'b1;
        ctrl_o.reads_rt  = 1'b1;
        ctrl_o.use_imm   = 1'b1;
        ctrl_o.mem_write = 1'b1;
      end
      OP_BEQZ, OP_BNEQZ: begin
        ctrl_o.itype    = T_BRANCH;
        ctrl_o.reads_rs = 1'b1;
        ctrl_o.use_imm  = 1'b1;
      end
      OP_J  : ctrl_o.itype = T_JUMP;
      OP_HLT: ctrl_o.itype = T_HALT;
      default: ;
    endcase
  end
endmodule
