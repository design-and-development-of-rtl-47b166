// hazard_unit: pipeline control for the three situations that stop the normal
// one-instruction-per-cycle flow.
//  * Load-use stall: the instruction in ID reads a register that the load in
//    EX will only have after its memory access. The PC and IF_ID hold and a
//    bubble enters ID_EX for one cycle; forwarding from MEM_WB then supplies
//    the loaded word.
//  * Taken branch or jump: the condition and target are known when the
//    instruction sits in EX_MEM (memory stage). The PC is redirected and the
//    three younger instructions (in IF_ID, ID_EX and the one leaving EX) are
//    turned into bubbles, so none of them writes the register file or memory.
//  * Halt: once HLT has been decoded, fetching stops (the PC holds and only
//    bubbles enter IF_ID) while older instructions drain; halted_i keeps it so.
// A redirect overrides a stall and a halt, because the instructions it
// squashes may be the very ones that caused them. Combinational.
module hazard_unit
  import mips_pkg::*;
(
  // decode stage
  input  logic     id_valid_i,
  input  logic     id_is_halt_i,
  input  logic     id_reads_rs_i,
  input  logic     id_reads_rt_i,
  input  reg_idx_t id_rs_i,
  input  reg_idx_t id_rt_i,
  // execute stage
  input  logic     ex_valid_i,
  input  logic     ex_is_load_i,
  input  logic     ex_is_halt_i,
  input  reg_idx_t ex_dest_i,
  // memory stage
  input  logic     mem_valid_i,
  input  logic     mem_is_halt_i,
  input  logic     mem_take_i,
  // write-back stage / processor state
  input  logic     wb_is_halt_i,
  input  logic     halted_i,
  // controls
  output logic     pc_hold_o,
  output logic     pc_take_o,
  output logic     if_id_hold_o,
  output logic     if_id_flush_o,
  output logic     id_ex_flush_o,
  output logic     ex_mem_flush_o,
  output logic     load_use_o
);
  logic take, halt_stop;

  always_comb begin
    take       = mem_valid_i && mem_take_i;
    load_use_o = ex_valid_i && ex_is_load_i && ex_dest_i != '0 && id_valid_i &&
                 ((id_reads_rs_i && id_rs_i == ex_dest_i) ||
                  (id_reads_rt_i && id_rt_i == ex_dest_i));
    halt_stop  = (id_valid_i && id_is_halt_i) || (ex_valid_i && ex_is_halt_i) ||
                 (mem_valid_i && mem_is_halt_i) || wb_is_halt_i || halted_i;

    pc_take_o      = take;
    pc_hold_o      = !take && (load_use_o || halt_stop);
    if_id_flush_o  = take || (halt_stop && !load_use_o);
    if_id_hold_o   = !take && load_use_o;
    id_ex_flush_o  = take || load_use_o;
    ex_mem_flush_o = take;
  end
endmodule
