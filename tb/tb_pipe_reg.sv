// tb_pipe_reg: a pipeline buffer carrying an EX_MEM bundle, driven with random
// data and random hold/flush; the output must follow the rule
// reset or flush -> bubble, else hold -> keep, else -> capture.
module tb_pipe_reg;
  import mips_pkg::*;
  logic clk = 0, rst = 1, hold = 0, flush = 0;
  ex_mem_t d, q, model;
  int checks = 0, failures = 0, n_hold = 0, n_flush = 0;

  pipe_reg #(.T(ex_mem_t)) dut (.clk, .rst, .hold_i(hold), .flush_i(flush), .d_i(d), .q_o(q));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    @(negedge clk); @(negedge clk);
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset"); end
    rst = 0;
    model = '0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      d = {$urandom, $urandom, $urandom, $urandom};
      hold  = $urandom_range(0, 3) == 0;
      flush = $urandom_range(0, 4) == 0;
      n_hold += int'(hold); n_flush += int'(flush);
      @(posedge clk);
      if (flush) model = '0;
      else if (!hold) model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 10) $display("FAIL hold=%b flush=%b q=%h exp=%h", hold, flush, q, model);
      end
    end
    checks++;
    if (n_hold == 0 || n_flush == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
