// mips_tb_pkg: testbench helpers for the pipelined processor.
//  * Encoders (rr, ri, sh, jmp, hlt) that build 32-bit instruction words.
//  * mips_iss: an instruction-level reference model. It executes a program one
//    instruction at a time, with no notion of a pipeline, and so gives the
//    architectural result (registers and data memory) that the pipeline must
//    reproduce. It also counts what decides the pipeline's cycle count:
//    instructions executed, taken branches/jumps (3 squashed slots each) and
//    load-use pairs (1 stall cycle each).
package mips_tb_pkg;
  import mips_pkg::*;

  function automatic word_t rr(input opcode_e op, input int rd, input int rs, input int rt);
    return {op, 5'(rs), 5'(rt), 5'(rd), 5'd0, 6'd0};
  endfunction

  function automatic word_t ri(input opcode_e op, input int rt, input int rs, input int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  function automatic word_t sh(input opcode_e op, input int rd, input int rs, input int shamt);
    return {op, 5'(rs), 5'd0, 5'(rd), 5'(shamt), 6'd0};
  endfunction

  function automatic word_t jmp(input int target);
    return {OP_J, 26'(target)};
  endfunction

  function automatic word_t hlt();
    return {OP_HLT, 26'd0};
  endfunction

  class mips_iss;
    int unsigned imem_depth;
    int unsigned dmem_depth;
    word_t imem[];
    word_t dmem[];
    word_t regs[32];
    int    executed;
    int    taken;
    int    load_use;
    bit    halted;

    function new(int unsigned idepth, int unsigned ddepth);
      imem_depth = idepth;
      dmem_depth = ddepth;
      imem = new[idepth];
      dmem = new[ddepth];
      foreach (imem[i]) imem[i] = hlt();
      foreach (dmem[i]) dmem[i] = '0;
      foreach (regs[i]) regs[i] = '0;
    endfunction

    // registers an instruction reads, mirroring the control table
    static function automatic void sources(input word_t ir, output bit rs_used, output bit rt_used);
      logic [5:0] op = ir[31:26];
      rs_used = 0;
      rt_used = 0;
      case (op)
        OP_ADD, OP_SUB, OP_AND, OP_OR, OP_MUL, OP_NOR, OP_XOR, OP_SW: begin
          rs_used = 1; rt_used = 1;
        end
        OP_SLL, OP_SRL, OP_SRA, OP_ADDI, OP_SUBI, OP_LW, OP_BEQZ, OP_BNEQZ: rs_used = 1;
        default: ;
      endcase
    endfunction

    function automatic void run(input int max_steps);
      word_t pc = '0;
      bit    prev_load = 0;
      int    prev_dest = 0;
      executed = 0; taken = 0; load_use = 0; halted = 0;
      for (int step = 0; step < max_steps && !halted; step++) begin
        word_t ir = imem[pc % imem_depth];
        logic [5:0] op = ir[31:26];
        int rs = int'(ir[25:21]), rt = int'(ir[20:16]), rd = int'(ir[15:11]);
        int shamt = int'(ir[10:6]);
        word_t a = regs[rs], b = regs[rt];
        word_t imm = {{16{ir[15]}}, ir[15:0]};
        word_t npc = pc + 1;
        bit rs_used, rt_used;
        int dest = 0;
        word_t res = '0;
        sources(ir, rs_used, rt_used);
        if (prev_load && prev_dest != 0 &&
            ((rs_used && rs == prev_dest) || (rt_used && rt == prev_dest)))
          load_use++;
        prev_load = 0;
        executed++;
        case (op)
          OP_ADD:  begin dest = rd; res = a + b; end
          OP_SUB:  begin dest = rd; res = a - b; end
          OP_AND:  begin dest = rd; res = a & b; end
          OP_OR:   begin dest = rd; res = a | b; end
          OP_MUL:  begin dest = rd; res = a * b; end
          OP_NOR:  begin dest = rd; res = ~(a | b); end
          OP_XOR:  begin dest = rd; res = a ^ b; end
          OP_SLL:  begin dest = rd; res = a << shamt; end
          OP_SRL:  begin dest = rd; res = a >> shamt; end
          OP_SRA:  begin dest = rd; res = word_t'($signed(a) >>> shamt); end
          OP_ADDI: begin dest = rt; res = a + imm; end
          OP_SUBI: begin dest = rt; res = a - imm; end
          OP_LW:   begin
            dest = rt; res = dmem[(a + imm) % dmem_depth];
            prev_load = 1; prev_dest = rt;
          end
          OP_SW:   dmem[(a + imm) % dmem_depth] = b;
          OP_BEQZ: if (a == 0) begin npc = pc + 1 + imm; taken++; end
          OP_BNEQZ: if (a != 0) begin npc = pc + 1 + imm; taken++; end
          OP_J:    begin npc = {npc[31:26], ir[25:0]}; taken++; end
          OP_HLT:  halted = 1;
          default: ;
        endcase
        if (dest != 0) regs[dest] = res;
        pc = npc;
      end
    endfunction
  endclass
endpackage
