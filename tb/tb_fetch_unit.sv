// tb_fetch_unit: the PC must reset to 0, step by one word per cycle, stay put
// while held, load the branch target when take is set (even while held), and
// NPC must always be PC + 1.
module tb_fetch_unit;
  import mips_pkg::*;
  logic clk = 0, rst = 1, take = 0, hold = 0;
  word_t target = '0, pc, npc;
  word_t model;
  int checks = 0, failures = 0;

  fetch_unit dut (.clk, .rst, .take_i(take), .target_i(target), .hold_i(hold),
                  .pc_o(pc), .npc_o(npc));

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
    @(negedge clk); @(negedge clk);
    check(pc == 0, "reset PC");
    rst = 0;
    model = 0;
    // ten plain steps
    for (int i = 1; i <= 10; i++) begin
      @(negedge clk);
      check(pc == word_t'(i) && npc == word_t'(i + 1), $sformatf("step %0d pc=%0d", i, pc));
    end
    model = 11;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      take = $urandom_range(0, 5) == 0;
      hold = $urandom_range(0, 3) == 0;
      target = $urandom;
      #1 check(npc == pc + 1, "npc");
      @(posedge clk);
      if (take) model = target;
      else if (!hold) model = model + 1;
      #1 check(pc == model, $sformatf("pc=%h expected %h", pc, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
