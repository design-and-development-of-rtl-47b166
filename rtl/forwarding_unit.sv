// forwarding_unit: decides where each execute-stage operand comes from. The
// register values captured in ID_EX can be stale when one of the two
// instructions ahead (now in EX_MEM or MEM_WB) writes the same register. The
// nearer producer wins: EX_MEM first (its ALUOut), then MEM_WB (its
// write-back value, ALU result or loaded data). A load in EX_MEM cannot
// forward because its data is not read yet; the hazard unit stalls the
// consumer for one cycle so that the value arrives through MEM_WB. Register 0
// is never forwarded. Operand B is forwarded for the store data and R-type
// operands even when the ALU takes the immediate. Combinational.
module forwarding_unit
  import mips_pkg::*;
(
  input  reg_idx_t ex_rs_i,
  input  reg_idx_t ex_rt_i,
  input  logic     ex_reads_rs_i,
  input  logic     ex_reads_rt_i,
  input  logic     mem_valid_i,
  input  logic     mem_reg_write_i,
  input  logic     mem_is_load_i,
  input  reg_idx_t mem_dest_i,
  input  logic     wb_valid_i,
  input  logic     wb_reg_write_i,
  input  reg_idx_t wb_dest_i,
  output fwd_sel_e fwd_a_o,
  output fwd_sel_e fwd_b_o
);
  function automatic fwd_sel_e pick(input logic reads, input reg_idx_t src);
    if (!reads || src == '0) return FWD_NONE;
    if (mem_valid_i && mem_reg_write_i && !mem_is_load_i && mem_dest_i == src)
      return FWD_EX_MEM;
    if (wb_valid_i && wb_reg_write_i && wb_dest_i == src)
      return FWD_MEM_WB;
    return FWD_NONE;
  endfunction

  always_comb begin
    fwd_a_o = pick(ex_reads_rs_i, ex_rs_i);
    fwd_b_o = pick(ex_reads_rt_i, ex_rt_i);
  end
endmodule
