// mips_pkg: types and constants shared by the five-stage MIPS-like pipeline.
//
// Instruction formats (32 bits):
//   R type : op[31:26] rs[25:21] rt[20:16] rd[15:11] shamt[10:6] funct[5:0]
//   I type : op[31:26] rs[25:21] rt[20:16] imm[15:0]
//   J type : op[31:26] target[25:0]
// The operation of an R-type instruction is chosen by its opcode (funct is
// ignored), as in the machine code of the reference programs: ADD = 000000,
// OR = 000011, MUL = 000101, LW = 001000, SW = 001001, ADDI = 001010,
// SUBI = 001011, BNEQZ = 001101, HLT = 111111. SUB, AND, BEQZ follow the same
// family's table; NOR, XOR, SLL, SRL, SRA and J have no code in the reference
// programs and were given free opcodes by this design.
//
// Each instruction is also classified into a 3-bit type that travels down the
// pipeline (0 RR_ALU, 1 RM_ALU, 2 LOAD, 3 STORE, 4 BRANCH, 5 HALT, 6 JUMP).
package mips_pkg;

  localparam int unsigned XLEN = 32;

  typedef logic [XLEN-1:0] word_t;
  typedef logic [4:0]      reg_idx_t;

  // Opcodes
  typedef enum logic [5:0] {
    OP_ADD   = 6'b000000,
    OP_SUB   = 6'b000001,
    OP_AND   = 6'b000010,
    OP_OR    = 6'b000011,
    OP_MUL   = 6'b000101,
    OP_NOR   = 6'b000110,
    OP_XOR   = 6'b000111,
    OP_LW    = 6'b001000,
    OP_SW    = 6'b001001,
    OP_ADDI  = 6'b001010,
    OP_SUBI  = 6'b001011,
    OP_BNEQZ = 6'b001101,
    OP_BEQZ  = 6'b001110,
    OP_SLL   = 6'b010000,
    OP_SRL   = 6'b010001,
    OP_SRA   = 6'b010010,
    OP_J     = 6'b010100,
    OP_HLT   = 6'b111111
  } opcode_e;

  // Instruction classes carried in the pipeline buffers
  typedef enum logic [2:0] {
    T_RR_ALU = 3'd0,
    T_RM_ALU = 3'd1,
    T_LOAD   = 3'd2,
    T_STORE  = 3'd3,
    T_BRANCH = 3'd4,
    T_HALT   = 3'd5,
    T_JUMP   = 3'd6,
    T_NONE   = 3'd7   // bubble or undefined opcode: no effect
  } itype_e;

  // ALU commands ("Execute Command")
  typedef enum logic [3:0] {
    ALU_ADD  = 4'd0,
    ALU_SUB  = 4'd1,
    ALU_AND  = 4'd2,
    ALU_OR   = 4'd3,
    ALU_NOR  = 4'd4,
    ALU_XOR  = 4'd5,
    ALU_SLL  = 4'd6,
    ALU_SRL  = 4'd7,
    ALU_SRA  = 4'd8,
    ALU_MUL  = 4'd9
  } alu_op_e;

  // Forwarding source of an EX-stage operand
  typedef enum logic [1:0] {
    FWD_NONE   = 2'd0,  // value read from the register bank in ID
    FWD_EX_MEM = 2'd1,  // ALUOut of the instruction one ahead
    FWD_MEM_WB = 2'd2   // write-back value of the instruction two ahead
  } fwd_sel_e;

  // Decoded control of one instruction
  typedef struct packed {
    itype_e   itype;
    alu_op_e  alu_op;
    logic     use_imm;    // ALU operand B is the sign-extended immediate
    logic     use_shamt;  // ALU operand B is the shift amount field
    logic     reads_rs;
    logic     reads_rt;
    logic     reg_write;
    logic     dest_rd;    // destination is rd (R type), else rt
    logic     mem_read;
    logic     mem_write;
  } ctrl_t;

  // IF_ID buffer
  typedef struct packed {
    logic  valid;
    word_t npc;
    word_t ir;
  } if_id_t;

  // ID_EX buffer
  typedef struct packed {
    logic     valid;
    ctrl_t    ctrl;
    word_t    npc;
    word_t    ir;
    word_t    a;
    word_t    b;
    word_t    imm;
    reg_idx_t rs;
    reg_idx_t rt;
    reg_idx_t dest;
  } id_ex_t;

  // EX_MEM buffer
  typedef struct packed {
    logic     valid;
    itype_e   itype;
    logic     reg_write;
    logic     mem_read;
    logic     mem_write;
    word_t    ir;
    word_t    alu_out;
    word_t    b;
    logic     cond;
    reg_idx_t dest;
  } ex_mem_t;

  // MEM_WB buffer
  typedef struct packed {
    logic     valid;
    itype_e   itype;
    logic     reg_write;
    logic     mem_read;
    word_t    ir;
    word_t    alu_out;
    word_t    lmd;
    reg_idx_t dest;
  } mem_wb_t;

endpackage
