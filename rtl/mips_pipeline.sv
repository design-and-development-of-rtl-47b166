// mips_pipeline: a 32-bit, five-stage pipelined RISC processor with a MIPS-like
// instruction set and separate instruction and data memories.
//
// Stages, one clock cycle each, separated by the buffers IF_ID, ID_EX, EX_MEM
// and MEM_WB (pipe_reg):
//   IF  - the PC addresses the instruction memory; IR and NPC = PC + 1 are
//         captured in IF_ID.
//   ID  - the control unit decodes the opcode, the register bank reads rs and
//         rt (A and B), the sign-extend unit widens the 16-bit immediate.
//   EX  - two multiplexers choose the ALU operands (A or NPC; B, the immediate
//         or the shift amount), after forwarding has replaced stale A/B values;
//         the ALU computes ALUOut (a result, an address or a branch target)
//         and the "=0" unit computes cond from A.
//   MEM - the data memory is read (LMD) or written with B at ALUOut. A taken
//         branch or jump (EX_MEM cond) loads the PC with ALUOut here.
//   WB  - a multiplexer picks LMD or ALUOut and writes rd (R type) or rt.
// Hazards: forwarding from EX_MEM and MEM_WB to EX, a one-cycle stall for a
// load followed by a user of its result, and squashing of the three
// instructions fetched after a taken branch (they become bubbles that write
// nothing). HLT stops fetching; halted_o rises when HLT reaches WB and the
// processor then idles until reset.
//
// Interface: one clock, synchronous active-high reset (PC = 0, registers and
// buffers cleared). Memories are not cleared: while rst is high the host
// writes the program through imem_we/imem_waddr/imem_wdata and data through
// the dmem_host_* port, which it can also use to read results at any time.
// dbg_reg_addr/dbg_reg_data read any register. The ev_* outputs pulse for one
// cycle per event (stall, squash, forwarded operand, retired instruction) for
// performance counting.
// The stage structure, buffers and datapath follow the documented block
// diagram; the single-edge clocking, forwarding paths, stall rule, memory
// depths, host ports and the opcodes not seen in the reference programs are
// this design's own choices.
module mips_pipeline
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned DMEM_DEPTH = 1024
) (
  input  logic     clk,
  input  logic     rst,
  // program load
  input  logic     imem_we,
  input  word_t    imem_waddr,
  input  word_t    imem_wdata,
  // data memory host port
  input  logic     dmem_host_we,
  input  word_t    dmem_host_addr,
  input  word_t    dmem_host_wdata,
  output word_t    dmem_host_rdata,
  // register inspection
  input  reg_idx_t dbg_reg_addr,
  output word_t    dbg_reg_data,
  // status and events
  output logic     halted_o,
  output word_t    pc_o,
  output logic     ev_stall_o,
  output logic     ev_squash_o,
  output logic     ev_fwd_ex_mem_o,
  output logic     ev_fwd_mem_wb_o,
  output logic     ev_retire_o
);
  if_id_t  if_id_d,  if_id_q;
  id_ex_t  id_ex_d,  id_ex_q;
  ex_mem_t ex_mem_d, ex_mem_q;
  mem_wb_t mem_wb_d, mem_wb_q;

  logic pc_hold, pc_take, if_id_hold, if_id_flush, id_ex_flush, ex_mem_flush;
  logic load_use, halted;

  // ------------------------------------------------------------------ IF
  word_t pc, npc, instr;

  fetch_unit u_fetch (
    .clk, .rst,
    .take_i  (pc_take),
    .target_i(ex_mem_q.alu_out),
    .hold_i  (pc_hold),
    .pc_o    (pc),
    .npc_o   (npc)
  );

  instr_mem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk,
    .addr_i (pc),
    .instr_o(instr),
    .we_i   (imem_we),
    .waddr_i(imem_waddr),
    .wdata_i(imem_wdata)
  );

  always_comb if_id_d = '{valid: 1'b1, npc: npc, ir: instr};

  pipe_reg #(.T(if_id_t)) u_if_id (
    .clk, .rst, .hold_i(if_id_hold), .flush_i(if_id_flush),
    .d_i(if_id_d), .q_o(if_id_q)
  );

  // ------------------------------------------------------------------ ID
  ctrl_t    id_ctrl;
  word_t    rs_data, rt_data, imm_ext;
  reg_idx_t id_rs, id_rt, id_rd;
  logic     wb_we;
  reg_idx_t wb_dest;
  word_t    wb_value;

  always_comb begin
    id_rs = if_id_q.ir[25:21];
    id_rt = if_id_q.ir[20:16];
    id_rd = if_id_q.ir[15:11];
  end

  control_unit u_ctrl (
    .op_i  (if_id_q.ir[31:26]),
    .ctrl_o(id_ctrl)
  );

  register_bank u_regs (
    .clk, .rst,
    .rs_i      (id_rs),
    .rt_i      (id_rt),
    .rs_data_o (rs_data),
    .rt_data_o (rt_data),
    .we_i      (wb_we),
    .wa_i      (wb_dest),
    .wd_i      (wb_value),
    .dbg_addr_i(dbg_reg_addr),
    .dbg_data_o(dbg_reg_data)
  );

  sign_extend #(.IN_W(16), .OUT_W(XLEN)) u_sext (
    .imm_i(if_id_q.ir[15:0]),
    .ext_o(imm_ext)
  );

  always_comb begin
    id_ex_d = '{
      valid: if_id_q.valid,
      ctrl : id_ctrl,
      npc  : if_id_q.npc,
      ir   : if_id_q.ir,
      a    : rs_data,
      b    : rt_data,
      imm  : imm_ext,
      rs   : id_rs,
      rt   : id_rt,
      dest : id_ctrl.dest_rd ? id_rd : id_rt
    };
  end

  pipe_reg #(.T(id_ex_t)) u_id_ex (
    .clk, .rst, .hold_i(1'b0), .flush_i(id_ex_flush),
    .d_i(id_ex_d), .q_o(id_ex_q)
  );

  // ------------------------------------------------------------------ EX
  fwd_sel_e fwd_a, fwd_b;
  word_t    a_fwd, b_fwd, alu_a, alu_b, alu_y;
  logic     cond;
  logic     ex_is_branch, ex_is_jump;

  forwarding_unit u_fwd (
    .ex_rs_i        (id_ex_q.rs),
    .ex_rt_i        (id_ex_q.rt),
    .ex_reads_rs_i  (id_ex_q.ctrl.reads_rs),
    .ex_reads_rt_i  (id_ex_q.ctrl.reads_rt),
    .mem_valid_i    (ex_mem_q.valid),
    .mem_reg_write_i(ex_mem_q.reg_write),
    .mem_is_load_i  (ex_mem_q.mem_read),
    .mem_dest_i     (ex_mem_q.dest),
    .wb_valid_i     (mem_wb_q.valid),
    .wb_reg_write_i (mem_wb_q.reg_write),
    .wb_dest_i      (mem_wb_q.dest),
    .fwd_a_o        (fwd_a),
    .fwd_b_o        (fwd_b)
  );

  always_comb begin
    unique case (fwd_a)
      FWD_EX_MEM: a_fwd = ex_mem_q.alu_out;
      FWD_MEM_WB: a_fwd = wb_value;
      default:    a_fwd = id_ex_q.a;
    endcase
    unique case (fwd_b)
      FWD_EX_MEM: b_fwd = ex_mem_q.alu_out;
      FWD_MEM_WB: b_fwd = wb_value;
      default:    b_fwd = id_ex_q.b;
    endcase

    ex_is_branch = (id_ex_q.ctrl.itype == T_BRANCH);
    ex_is_jump   = (id_ex_q.ctrl.itype == T_JUMP);
    // operand multiplexers: a branch adds its offset to NPC
    alu_a = ex_is_branch ? id_ex_q.npc : a_fwd;
    if (id_ex_q.ctrl.use_imm)        alu_b = id_ex_q.imm;
    else if (id_ex_q.ctrl.use_shamt) alu_b = word_t'(id_ex_q.ir[10:6]);
    else                             alu_b = b_fwd;
  end

  alu u_alu (
    .a_i (alu_a),
    .b_i (alu_b),
    .op_i(id_ex_q.ctrl.alu_op),
    .y_o (alu_y)
  );

  branch_cond u_cond (
    .a_i   (a_fwd),
    .op_i  (id_ex_q.ir[31:26]),
    .cond_o(cond)
  );

  always_comb begin
    ex_mem_d = '{
      valid    : id_ex_q.valid,
      itype    : id_ex_q.ctrl.itype,
      reg_write: id_ex_q.ctrl.reg_write,
      mem_read : id_ex_q.ctrl.mem_read,
      mem_write: id_ex_q.ctrl.mem_write,
      ir       : id_ex_q.ir,
      // a jump keeps the upper NPC bits and takes the 26-bit target field
      alu_out  : ex_is_jump ? {id_ex_q.npc[31:26], id_ex_q.ir[25:0]} : alu_y,
      b        : b_fwd,
      cond     : (ex_is_branch || ex_is_jump) && cond,
      dest     : id_ex_q.dest
    };
  end

  pipe_reg #(.T(ex_mem_t)) u_ex_mem (
    .clk, .rst, .hold_i(1'b0), .flush_i(ex_mem_flush),
    .d_i(ex_mem_d), .q_o(ex_mem_q)
  );

  // ------------------------------------------------------------------ MEM
  word_t dm_rdata;

  data_mem #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk,
    .a_addr_i (ex_mem_q.alu_out),
    .a_we_i   (ex_mem_q.valid && ex_mem_q.mem_write),
    .a_wdata_i(ex_mem_q.b),
    .a_rdata_o(dm_rdata),
    .b_addr_i (dmem_host_addr),
    .b_we_i   (dmem_host_we),
    .b_wdata_i(dmem_host_wdata),
    .b_rdata_o(dmem_host_rdata)
  );

  always_comb begin
    mem_wb_d = '{
      valid    : ex_mem_q.valid,
      itype    : ex_mem_q.itype,
      reg_write: ex_mem_q.reg_write,
      mem_read : ex_mem_q.mem_read,
      ir       : ex_mem_q.ir,
      alu_out  : ex_mem_q.alu_out,
      lmd      : dm_rdata,
      dest     : ex_mem_q.dest
    };
  end

  pipe_reg #(.T(mem_wb_t)) u_mem_wb (
    .clk, .rst, .hold_i(1'b0), .flush_i(1'b0),
    .d_i(mem_wb_d), .q_o(mem_wb_q)
  );

  // ------------------------------------------------------------------ WB
  always_comb begin
    wb_value = mem_wb_q.mem_read ? mem_wb_q.lmd : mem_wb_q.alu_out;
    wb_dest  = mem_wb_q.dest;
    wb_we    = mem_wb_q.valid && mem_wb_q.reg_write;
  end

  always_ff @(posedge clk) begin
    if (rst) halted <= 1'b0;
    else if (mem_wb_q.valid && mem_wb_q.itype == T_HALT) halted <= 1'b1;
  end

  // ------------------------------------------------------------------ hazards
  hazard_unit u_haz (
    .id_valid_i    (if_id_q.valid),
    .id_is_halt_i  (id_ctrl.itype == T_HALT),
    .id_reads_rs_i (id_ctrl.reads_rs),
    .id_reads_rt_i (id_ctrl.reads_rt),
    .id_rs_i       (id_rs),
    .id_rt_i       (id_rt),
    .ex_valid_i    (id_ex_q.valid),
    .ex_is_load_i  (id_ex_q.ctrl.mem_read),
    .ex_is_halt_i  (id_ex_q.ctrl.itype == T_HALT),
    .ex_dest_i     (id_ex_q.dest),
    .mem_valid_i   (ex_mem_q.valid),
    .mem_is_halt_i (ex_mem_q.itype == T_HALT),
    .mem_take_i    (ex_mem_q.cond),
    .wb_is_halt_i  (mem_wb_q.valid && mem_wb_q.itype == T_HALT),
    .halted_i      (halted),
    .pc_hold_o     (pc_hold),
    .pc_take_o     (pc_take),
    .if_id_hold_o  (if_id_hold),
    .if_id_flush_o (if_id_flush),
    .id_ex_flush_o (id_ex_flush),
    .ex_mem_flush_o(ex_mem_flush),
    .load_use_o    (load_use)
  );

  // ------------------------------------------------------------------ status
  always_comb begin
    halted_o        = halted;
    pc_o            = pc;
    ev_stall_o      = load_use && !pc_take;
    ev_squash_o     = pc_take;
    ev_fwd_ex_mem_o = id_ex_q.valid && (fwd_a == FWD_EX_MEM || fwd_b == FWD_EX_MEM);
    ev_fwd_mem_wb_o = id_ex_q.valid && (fwd_a == FWD_MEM_WB || fwd_b == FWD_MEM_WB);
    ev_retire_o     = mem_wb_q.valid && mem_wb_q.itype != T_NONE;
  end

  // nothing is written to the register bank once the processor has halted
  a_no_write_after_halt: assert property (@(posedge clk) disable iff (rst)
    halted |-> !wb_we);
  // a load result is never forwarded from EX_MEM (the stall must prevent it)
  a_no_load_fwd: assert property (@(posedge clk) disable iff (rst)
    (fwd_a == FWD_EX_MEM || fwd_b == FWD_EX_MEM) |-> !ex_mem_q.mem_read);
  // halt is sticky
  a_halt_sticky: assert property (@(posedge clk) disable iff (rst)
    halted |=> halted);
endmodule
