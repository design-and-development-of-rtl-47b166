// tb_mips_pipeline: end-to-end test of the five-stage processor at its default
// sizes (1024-word instruction and data memories).
// Programs run:
//  1. the add program of the reference simulation (printed machine code):
//     R1=10, R2=20, R3=25, R4=R1+R2, R5=R4+R3;
//  2. the factorial program of the reference simulation (printed machine
//     code, with its no-op OR instructions): 7! from DM[200] into DM[198];
//  3. the same factorial without the no-ops, so that results must be
//     forwarded and the load feeding MUL must stall;
//  4. a program with a jump, a taken and a not-taken BEQZ, shifts, NOR, XOR;
//  5. NRAND random straight-line programs with forward branches and jumps.
// Every program is also executed by the instruction-level model mips_iss;
// all 32 registers and the touched data words must agree, and the number of
// cycles from reset release to halted_o must be
//   executed instructions + 4 + load-use stalls + 3 x taken branches.
// Each hazard mechanism (stall, squash, both forwarding paths) must be seen.
module tb_mips_pipeline;
  import mips_pkg::*;
  import mips_tb_pkg::*;

  localparam int unsigned IMEM_DEPTH = 1024;
  localparam int unsigned DMEM_DEPTH = 1024;
  localparam int NRAND = 40;

  logic     clk = 1'b0;
  logic     rst = 1'b1;
  logic     imem_we = 1'b0;
  word_t    imem_waddr = '0, imem_wdata = '0;
  logic     dmem_host_we = 1'b0;
  word_t    dmem_host_addr = '0, dmem_host_wdata = '0, dmem_host_rdata;
  reg_idx_t dbg_reg_addr = '0;
  word_t    dbg_reg_data, pc;
  logic     halted, ev_stall, ev_squash, ev_fwd_ex_mem, ev_fwd_mem_wb, ev_retire;

  mips_pipeline dut (
    .clk, .rst,
    .imem_we, .imem_waddr, .imem_wdata,
    .dmem_host_we, .dmem_host_addr, .dmem_host_wdata, .dmem_host_rdata,
    .dbg_reg_addr, .dbg_reg_data,
    .halted_o(halted), .pc_o(pc),
    .ev_stall_o(ev_stall), .ev_squash_o(ev_squash),
    .ev_fwd_ex_mem_o(ev_fwd_ex_mem), .ev_fwd_mem_wb_o(ev_fwd_mem_wb),
    .ev_retire_o(ev_retire)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0, n_squash = 0, n_fwd1 = 0, n_fwd2 = 0, n_retire = 0;

  always @(posedge clk) if (!rst) begin
    n_stall  += int'(ev_stall);
    n_squash += int'(ev_squash);
    n_fwd1   += int'(ev_fwd_ex_mem);
    n_fwd2   += int'(ev_fwd_mem_wb);
    n_retire += int'(ev_retire);
  end

  // trace of the values taken by one register while a program runs
  bit    trace_on = 1'b0;
  word_t trace [$];
  always @(negedge clk) if (trace_on && !rst && !halted) begin
    if (trace.size() == 0 || trace[$] != dbg_reg_data) trace.push_back(dbg_reg_data);
  end

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // load program and data, run to HLT, compare with the reference model
  task automatic run_program(input string name, mips_iss iss, input int max_cycles);
    int cycles = 0, retired_before;
    int expect_cycles;
    mips_iss ref_m = new(IMEM_DEPTH, DMEM_DEPTH);
    foreach (iss.imem[i]) ref_m.imem[i] = iss.imem[i];
    foreach (iss.dmem[i]) ref_m.dmem[i] = iss.dmem[i];
    ref_m.run(100000);

    rst = 1'b1;
    @(negedge clk);
    for (int i = 0; i < int'(IMEM_DEPTH); i++) begin
      imem_we = 1'b1; imem_waddr = word_t'(i); imem_wdata = iss.imem[i];
      dmem_host_we = 1'b1; dmem_host_addr = word_t'(i); dmem_host_wdata = iss.dmem[i];
      @(negedge clk);
    end
    imem_we = 1'b0; dmem_host_we = 1'b0;
    @(negedge clk);
    retired_before = n_retire;
    rst = 1'b0;
    while (!halted && cycles < max_cycles) begin
      @(posedge clk);
      cycles++;
      #1;
    end
    check(halted, $sformatf("%s: halted", name));
    expect_cycles = ref_m.executed + 4 + ref_m.load_use + 3 * ref_m.taken;
    check(cycles == expect_cycles,
          $sformatf("%s: cycles %0d expected %0d (exec %0d, stalls %0d, taken %0d)",
                    name, cycles, expect_cycles, ref_m.executed, ref_m.load_use, ref_m.taken));
    check(n_retire - retired_before == ref_m.executed,
          $sformatf("%s: retired %0d expected %0d", name, n_retire - retired_before,
                    ref_m.executed));
    // stays halted
    repeat (5) @(posedge clk);
    #1 check(halted, $sformatf("%s: remains halted", name));

    @(negedge clk);
    for (int r = 0; r < 32; r++) begin
      dbg_reg_addr = reg_idx_t'(r);
      #1;
      check(dbg_reg_data == ref_m.regs[r],
            $sformatf("%s: R%0d = %h expected %h", name, r, dbg_reg_data, ref_m.regs[r]));
    end
    for (int i = 0; i < 256; i++) begin
      dmem_host_addr = word_t'(i);
      #1;
      check(dmem_host_rdata == ref_m.dmem[i],
            $sformatf("%s: DM[%0d] = %h expected %h", name, i, dmem_host_rdata, ref_m.dmem[i]));
    end
    $display("%s: %0d cycles, %0d instructions, %0d stalls, %0d taken",
             name, cycles, ref_m.executed, ref_m.load_use, ref_m.taken);
  endtask

  task automatic expect_reg(input int r, input word_t v, input string name);
    @(negedge clk);
    dbg_reg_addr = reg_idx_t'(r);
    #1 check(dbg_reg_data == v, $sformatf("%s: R%0d = %0d, expected %0d", name, r, dbg_reg_data, v));
  endtask

  task automatic expect_mem(input int a, input word_t v, input string name);
    @(negedge clk);
    dmem_host_addr = word_t'(a);
    #1 check(dmem_host_rdata == v, $sformatf("%s: DM[%0d] = %0d, expected %0d", name, a, dmem_host_rdata, v));
  endtask

  function automatic word_t rand_instr(input int pc, input int last);
    int k, rd, rs, rt;
    k  = int'($urandom_range(0, 19));
    rd = int'($urandom_range(0, 7));
    rs = int'($urandom_range(0, 7));
    rt = int'($urandom_range(0, 7));
    case (k)
      0: return rr(OP_ADD, rd, rs, rt);
      1: return rr(OP_SUB, rd, rs, rt);
      2: return rr(OP_AND, rd, rs, rt);
      3: return rr(OP_OR,  rd, rs, rt);
      4: return rr(OP_MUL, rd, rs, rt);
      5: return rr(OP_NOR, rd, rs, rt);
      6: return rr(OP_XOR, rd, rs, rt);
      7: return sh(OP_SLL, rd, rs, int'($urandom_range(0, 31)));
      8: return sh(OP_SRL, rd, rs, int'($urandom_range(0, 31)));
      9: return sh(OP_SRA, rd, rs, int'($urandom_range(0, 31)));
      10, 11: return ri(OP_ADDI, rt, rs, int'($urandom_range(0, 65535)));
      12: return ri(OP_SUBI, rt, rs, int'($urandom_range(0, 200)));
      13, 14: return ri(OP_LW, rt, ($urandom_range(0, 3) == 0) ? rs : 0, int'($urandom_range(0, 63)));
      15, 16: return ri(OP_SW, rt, ($urandom_range(0, 3) == 0) ? rs : 0, int'($urandom_range(0, 63)));
      17: return ri(OP_BEQZ, 0, rs, int'($urandom_range(0, 3)));
      18: return ri(OP_BNEQZ, 0, rs, int'($urandom_range(0, 3)));
      default: return jmp((pc + 1 + int'($urandom_range(0, 3)) > last) ? last
                          : pc + 1 + int'($urandom_range(0, 3)));
    endcase
  endfunction

  initial begin
    mips_iss p;
    word_t prog_add [7] = '{32'h2801000a, 32'h28020014, 32'h28030019, 32'h0ce73800,
                            32'h00222000, 32'h00832800, 32'hfc000000};
    word_t prog_fact [11] = '{32'h280a00c8, 32'h28020001, 32'h0e94a000, 32'h21430000,
                              32'h0e94a000, 32'h14431000, 32'h2c630001, 32'h0e94a000,
                              32'h3460fffc, 32'h2542fffe, 32'hfc000000};

    // 1. add program
    p = new(IMEM_DEPTH, DMEM_DEPTH);
    foreach (prog_add[i]) p.imem[i] = prog_add[i];
    run_program("add", p, 200);
    expect_reg(1, 10, "add"); expect_reg(2, 20, "add"); expect_reg(3, 25, "add");
    expect_reg(4, 30, "add"); expect_reg(5, 55, "add");

    // 2. factorial with no-ops
    p = new(IMEM_DEPTH, DMEM_DEPTH);
    foreach (prog_fact[i]) p.imem[i] = prog_fact[i];
    p.dmem[200] = 7;
    dbg_reg_addr = 5'd2;
    trace.delete();
    trace_on = 1'b1;
    run_program("factorial", p, 500);
    trace_on = 1'b0;
    // R2 runs through the partial products 1, 7, 42, 210, ... of 7!
    begin
      word_t partial [8] = '{0, 1, 7, 42, 210, 840, 2520, 5040};
      check(trace.size() == 8, $sformatf("factorial: R2 took %0d values", trace.size()));
      foreach (partial[i])
        if (i < trace.size())
          check(trace[i] == partial[i], $sformatf("factorial: R2 value %0d = %0d, expected %0d",
                                                  i, trace[i], partial[i]));
    end
    expect_mem(198, 5040, "factorial"); expect_reg(2, 5040, "factorial");
    expect_reg(3, 0, "factorial");

    // 3. factorial without no-ops: forwarding and the load-use stall
    p = new(IMEM_DEPTH, DMEM_DEPTH);
    p.imem[0] = ri(OP_ADDI, 10, 0, 200);
    p.imem[1] = ri(OP_ADDI, 2, 0, 1);
    p.imem[2] = ri(OP_LW, 3, 10, 0);
    p.imem[3] = rr(OP_MUL, 2, 2, 3);      // loop: uses R3 right after the load
    p.imem[4] = ri(OP_SUBI, 3, 3, 1);
    p.imem[5] = ri(OP_BNEQZ, 0, 3, -3);   // needs R3 from EX_MEM
    p.imem[6] = ri(OP_SW, 2, 10, -2);
    p.imem[7] = hlt();
    p.dmem[200] = 10;
    run_program("factorial-fwd", p, 500);
    expect_mem(198, 3628800, "factorial-fwd");

    // 4. jump, BEQZ taken and not taken, shifts and logic
    p = new(IMEM_DEPTH, DMEM_DEPTH);
    p.imem[0]  = ri(OP_ADDI, 1, 0, -16);   // R1 = -16
    p.imem[1]  = jmp(4);
    p.imem[2]  = ri(OP_ADDI, 9, 0, 99);    // skipped
    p.imem[3]  = ri(OP_ADDI, 9, 0, 98);    // skipped
    p.imem[4]  = sh(OP_SRA, 2, 1, 2);      // R2 = -4
    p.imem[5]  = sh(OP_SRL, 3, 1, 28);     // R3 = 15
    p.imem[6]  = sh(OP_SLL, 4, 3, 4);      // R4 = 240
    p.imem[7]  = rr(OP_NOR, 5, 3, 0);      // R5 = ~15
    p.imem[8]  = rr(OP_XOR, 6, 4, 3);      // R6 = 255
    p.imem[9]  = ri(OP_BEQZ, 0, 6, 5);     // not taken
    p.imem[10] = ri(OP_BEQZ, 0, 0, 1);     // taken, skips 11
    p.imem[11] = ri(OP_ADDI, 9, 0, 97);    // skipped
    p.imem[12] = ri(OP_SW, 6, 0, 5);
    p.imem[13] = hlt();
    p.imem[14] = ri(OP_ADDI, 9, 0, 96);    // never fetched into execution
    run_program("jump-shift", p, 200);
    expect_reg(2, -4, "jump-shift"); expect_reg(3, 15, "jump-shift");
    expect_reg(4, 240, "jump-shift"); expect_reg(5, ~32'd15, "jump-shift");
    expect_reg(9, 0, "jump-shift"); expect_mem(5, 255, "jump-shift");

    // 5. random programs
    for (int t = 0; t < NRAND; t++) begin
      int len;
      len = int'($urandom_range(20, 120));
      p = new(IMEM_DEPTH, DMEM_DEPTH);
      for (int i = 0; i < 64; i++) p.dmem[i] = $urandom;
      for (int i = 1; i < 8; i++) p.imem[i-1] = ri(OP_ADDI, i, 0, int'($urandom_range(0, 65535)));
      for (int i = 7; i < len; i++) p.imem[i] = rand_instr(i, len);
      p.imem[len] = hlt();
      run_program($sformatf("random%0d", t), p, 2000);
    end

    $display("events: stalls=%0d squashes=%0d fwd_ex_mem=%0d fwd_mem_wb=%0d retired=%0d",
             n_stall, n_squash, n_fwd1, n_fwd2, n_retire);
    check(n_stall  > 0, "load-use stall never happened");
    check(n_squash > 0, "branch squash never happened");
    check(n_fwd1   > 0, "EX_MEM forwarding never happened");
    check(n_fwd2   > 0, "MEM_WB forwarding never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
