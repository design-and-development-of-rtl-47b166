// tb_instr_mem: fills the instruction memory with a pseudo-random pattern
// through the write port, then reads every word and random addresses (the
// upper address bits must be ignored) back through the fetch port.
module tb_instr_mem;
  import mips_pkg::*;
  localparam int DEPTH = 1024;
  logic clk = 0, we = 0;
  word_t addr = '0, instr, waddr = '0, wdata = '0;
  int checks = 0, failures = 0;

  instr_mem dut (.clk, .addr_i(addr), .instr_o(instr), .we_i(we),
                                  .waddr_i(waddr), .wdata_i(wdata));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t pattern(input int i);
    return word_t'(i) * 32'h9e37_79b9 ^ 32'h5a5a_0f0f;
  endfunction

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; waddr = word_t'(i); wdata = pattern(i);
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      addr = word_t'(i); #1;
      checks++;
      if (instr !== pattern(i)) begin failures++; $display("FAIL [%0d] = %h", i, instr); end
    end
    for (int n = 0; n < 1000; n++) begin
      addr = $urandom; #1;
      checks++;
      if (instr !== pattern(int'(addr % DEPTH))) begin
        failures++; $display("FAIL addr %h = %h", addr, instr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
