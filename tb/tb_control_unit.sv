// tb_control_unit: decodes all 64 opcodes and compares every control field
// with a table written out independently in this testbench.
module tb_control_unit;
  import mips_pkg::*;
  logic [5:0] op;
  ctrl_t c;
  int checks = 0, failures = 0;

  control_unit dut (.op_i(op), .ctrl_o(c));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected: {itype, alu_op, use_imm, use_shamt, reads_rs, reads_rt, reg_write, dest_rd, mem_read, mem_write}
  function automatic ctrl_t table_entry(input logic [5:0] o);
    case (o)
      6'b000000: return '{T_RR_ALU, ALU_ADD, 0, 0, 1, 1, 1, 1, 0, 0};
      6'b000001: return '{T_RR_ALU, ALU_SUB, 0, 0, 1, 1, 1, 1, 0, 0};
      6'b000010: return '{T_RR_ALU, ALU_AND, 0, 0, 1, 1, 1, 1, 0, 0};
      6'b000011: return '{T_RR_ALU, ALU_OR,  0, 0, 1, 1, 1, 1, 0, 0};
      6'b000101: return '{T_RR_ALU, ALU_MUL, 0, 0, 1, 1, 1, 1, 0, 0};
      6'b000110: return '{T_RR_ALU, ALU_NOR, 0, 0, 1, 1, 1, 1, 0, 0};
      6'b000111: return '{T_RR_ALU, ALU_XOR, 0, 0, 1, 1, 1, 1, 0, 0};
      6'b010000: return '{T_RR_ALU, ALU_SLL, 0, 1, 1, 0, 1, 1, 0, 0};
      6'b010001: return '{T_RR_ALU, ALU_SRL, 0, 1, 1, 0, 1, 1, 0, 0};
      6'b010010: return '{T_RR_ALU, ALU_SRA, 0, 1, 1, 0, 1, 1, 0, 0};
      6'b001010: return '{T_RM_ALU, ALU_ADD, 1, 0, 1, 0, 1, 0, 0, 0};
      6'b001011: return '{T_RM_ALU, ALU_SUB, 1, 0, 1, 0, 1, 0, 0, 0};
      6'b001000: return '{T_LOAD,   ALU_ADD, 1, 0, 1, 0, 1, 0, 1, 0};
      6'b001001: return '{T_STORE,  ALU_ADD, 1, 0, 1, 1, 0, 0, 0, 1};
      6'b001101: return '{T_BRANCH, ALU_ADD, 1, 0, 1, 0, 0, 0, 0, 0};
      6'b001110: return '{T_BRANCH, ALU_ADD, 1, 0, 1, 0, 0, 0, 0, 0};
      6'b010100: return '{T_JUMP,   ALU_ADD, 0, 0, 0, 0, 0, 0, 0, 0};
      6'b111111: return '{T_HALT,   ALU_ADD, 0, 0, 0, 0, 0, 0, 0, 0};
      default:   return '{T_NONE,   ALU_ADD, 0, 0, 0, 0, 0, 0, 0, 0};
    endcase
  endfunction

  initial begin
    for (int o = 0; o < 64; o++) begin
      ctrl_t e;
      op = 6'(o);
      #1;
      e = table_entry(op);
      checks++;
      if (c !== e) begin
        failures++;
        $display("FAIL op=%b got %p expected %p", op, c, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
