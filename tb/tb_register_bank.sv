// tb_register_bank: random writes and reads against an array model. Checks
// that reset clears every register, register 0 stays zero, a read in the
// same cycle as a write to that register returns the new value, and the
// debug port shows the stored contents.
module tb_register_bank;
  import mips_pkg::*;
  logic clk = 0, rst = 1, we = 0;
  reg_idx_t rs = '0, rt = '0, wa = '0, dbg = '0;
  word_t rs_d, rt_d, wd = '0, dbg_d;
  word_t model [32];
  int checks = 0, failures = 0;

  register_bank dut (.clk, .rst, .rs_i(rs), .rt_i(rt), .rs_data_o(rs_d), .rt_data_o(rt_d),
                     .we_i(we), .wa_i(wa), .wd_i(wd), .dbg_addr_i(dbg), .dbg_data_o(dbg_d));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    foreach (model[i]) model[i] = '0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int i = 0; i < 32; i++) begin
      dbg = reg_idx_t'(i); #1 check(dbg_d == 0, $sformatf("reset R%0d", i));
    end
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      we = ($urandom_range(0, 3) != 0);
      wa = reg_idx_t'($urandom);
      wd = $urandom;
      rs = ($urandom_range(0, 3) == 0) ? wa : reg_idx_t'($urandom);
      rt = reg_idx_t'($urandom);
      dbg = reg_idx_t'($urandom);
      #1;
      // expected: old contents, except a same-cycle write to a nonzero register
      check(rs_d == ((rs == 0) ? 0 : (we && rs == wa) ? wd : model[rs]),
            $sformatf("rs R%0d = %h", rs, rs_d));
      check(rt_d == ((rt == 0) ? 0 : (we && rt == wa) ? wd : model[rt]),
            $sformatf("rt R%0d = %h", rt, rt_d));
      check(dbg_d == model[dbg], $sformatf("dbg R%0d = %h", dbg, dbg_d));
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 32; i++) begin
      rs = reg_idx_t'(i); #1 check(rs_d == model[i], $sformatf("final R%0d", i));
    end
    rst = 1; @(negedge clk); rst = 0;
    for (int i = 0; i < 32; i++) begin
      rt = reg_idx_t'(i); #1 check(rt_d == 0, $sformatf("second reset R%0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
