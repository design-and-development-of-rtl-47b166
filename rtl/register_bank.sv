// register_bank: the 32 x 32-bit general register file. The decode stage reads
// two source registers (rs, rt) while the write-back stage writes the
// destination of an older instruction in the same cycle. A write and a read
// of the same register in one cycle return the new value (write-through), so
// an instruction decoded while its producer is in write-back sees the result;
// this stands in for writing in the first half of the cycle and reading in the
// second. Register 0 always reads as zero and ignores writes, as in MIPS. A
// third read port (dbg_*) lets a host or testbench inspect any register.
// Reads are combinational; the write happens on the rising clock edge.
// Synchronous active-high reset clears every register.
module register_bank
  import mips_pkg::*;
#(
  parameter int unsigned NREGS = 32
) (
  input  logic     clk,
  input  logic     rst,
  input  reg_idx_t rs_i,
  input  reg_idx_t rt_i,
  output word_t    rs_data_o,
  output word_t    rt_data_o,
  input  logic     we_i,
  input  reg_idx_t wa_i,
  input  word_t    wd_i,
  input  reg_idx_t dbg_addr_i,
  output word_t    dbg_data_o
);
  word_t regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(NREGS); i++) regs[i] <= '0;
    end else if (we_i && wa_i != '0) begin
      regs[wa_i] <= wd_i;
    end
  end

  function automatic word_t rd(input reg_idx_t a);
    if (a == '0)                 return '0;
    if (we_i && a == wa_i)       return wd_i;
    return regs[a];
  endfunction

  always_comb begin
    rs_data_o  = rd(rs_i);
    rt_data_o  = rd(rt_i);
    dbg_data_o = (dbg_addr_i == '0) ? '0 : regs[dbg_addr_i];
  end
endmodule
