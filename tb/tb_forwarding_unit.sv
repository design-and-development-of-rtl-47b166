// tb_forwarding_unit: random producer/consumer combinations over registers
// 0..3 (so that matches are frequent). Expected selection: no forwarding for
// an unread operand or register 0; else the instruction in EX_MEM if it is a
// valid, non-load register writer of that register; else the one in MEM_WB
// if it is a valid writer of it; else the register-bank value.
module tb_forwarding_unit;
  import mips_pkg::*;
  reg_idx_t rs, rt, mdest, wdest;
  logic rrs, rrt, mv, mw, ml, wv, ww;
  fwd_sel_e fa, fb;
  int checks = 0, failures = 0;
  int seen [3] = '{0, 0, 0};

  forwarding_unit dut (.ex_rs_i(rs), .ex_rt_i(rt), .ex_reads_rs_i(rrs), .ex_reads_rt_i(rrt),
                       .mem_valid_i(mv), .mem_reg_write_i(mw), .mem_is_load_i(ml),
                       .mem_dest_i(mdest), .wb_valid_i(wv), .wb_reg_write_i(ww),
                       .wb_dest_i(wdest), .fwd_a_o(fa), .fwd_b_o(fb));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fwd_sel_e expect_sel(input logic used, input reg_idx_t r);
    bit from_mem = mv && mw && !ml && (mdest == r);
    bit from_wb  = wv && ww && (wdest == r);
    if (!used || r == 0) return FWD_NONE;
    if (from_mem) return FWD_EX_MEM;
    if (from_wb)  return FWD_MEM_WB;
    return FWD_NONE;
  endfunction

  initial begin
    for (int n = 0; n < 20000; n++) begin
      fwd_sel_e ea, eb;
      rs = reg_idx_t'($urandom_range(0, 3)); rt = reg_idx_t'($urandom_range(0, 3));
      mdest = reg_idx_t'($urandom_range(0, 3)); wdest = reg_idx_t'($urandom_range(0, 3));
      {rrs, rrt, mv, mw, ml, wv, ww} = 7'($urandom);
      if ($urandom_range(0, 1) == 1) begin rrs = 1; mv = 1; mw = 1; wv = 1; ww = 1; end
      #1;
      ea = expect_sel(rrs, rs);
      eb = expect_sel(rrt, rt);
      seen[int'(ea)]++;
      checks += 2;
      if (fa !== ea) begin failures++; if (failures < 10) $display("FAIL A %s expected %s", fa.name(), ea.name()); end
      if (fb !== eb) begin failures++; if (failures < 10) $display("FAIL B %s expected %s", fb.name(), eb.name()); end
    end
    checks++;
    if (seen[0] == 0 || seen[1] == 0 || seen[2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
