// tb_data_mem: random traffic on both ports of the data memory against an
// array model: reads are combinational, writes take effect at the clock edge,
// and port A wins when both write the same word.
module tb_data_mem;
  import mips_pkg::*;
  localparam int DEPTH = 1024;
  logic clk = 0, a_we = 0, b_we = 0;
  word_t a_addr = '0, a_wd = '0, a_rd, b_addr = '0, b_wd = '0, b_rd;
  word_t model [DEPTH];
  int checks = 0, failures = 0;

  data_mem dut (.clk, .a_addr_i(a_addr), .a_we_i(a_we), .a_wdata_i(a_wd),
                                 .a_rdata_o(a_rd), .b_addr_i(b_addr), .b_we_i(b_we),
                                 .b_wdata_i(b_wd), .b_rdata_o(b_rd));

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
    // initialise through port B
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); b_we = 1; b_addr = word_t'(i); b_wd = word_t'(i * 7 + 3);
      model[i] = word_t'(i * 7 + 3);
    end
    @(negedge clk); b_we = 0;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      a_addr = word_t'($urandom_range(0, 63)) | (($urandom_range(0, 1) == 1) ? 32'h0001_0000 : 0);
      b_addr = ($urandom_range(0, 3) == 0) ? a_addr : word_t'($urandom_range(0, 63));
      a_we = $urandom_range(0, 1) == 1; a_wd = $urandom;
      b_we = $urandom_range(0, 1) == 1; b_wd = $urandom;
      #1;
      check(a_rd == model[a_addr % DEPTH], $sformatf("A read %h", a_addr));
      check(b_rd == model[b_addr % DEPTH], $sformatf("B read %h", b_addr));
      @(posedge clk);
      if (b_we) model[b_addr % DEPTH] = b_wd;
      if (a_we) model[a_addr % DEPTH] = a_wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
