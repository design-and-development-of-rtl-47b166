// tb_branch_cond: every opcode against zero, small and large operand values;
// the expected condition is written out per opcode.
module tb_branch_cond;
  import mips_pkg::*;
  word_t a;
  logic [5:0] op;
  logic cond;
  int checks = 0, failures = 0;

  branch_cond dut (.a_i(a), .op_i(op), .cond_o(cond));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t vals [5] = '{32'h0, 32'h1, 32'h8000_0000, 32'hffff_ffff, 32'h0001_0000};
    for (int o = 0; o < 64; o++) begin
      foreach (vals[i]) begin
        logic e;
        op = 6'(o); a = vals[i];
        #1;
        if (o == 6'b001110)      e = (i == 0);   // BEQZ
        else if (o == 6'b001101) e = (i != 0);   // BNEQZ
        else if (o == 6'b010100) e = 1'b1;       // J
        else                     e = 1'b0;
        checks++;
        if (cond !== e) begin
          failures++;
          $display("FAIL op=%b a=%h cond=%b expected %b", op, a, cond, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
