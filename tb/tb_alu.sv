// tb_alu: applies every ALU command to directed corner operands and random
// operands and compares with results computed in 64-bit integer arithmetic.
module tb_alu;
  import mips_pkg::*;
  word_t a, b, y;
  alu_op_e op;
  int checks = 0, failures = 0;

  alu dut (.a_i(a), .b_i(b), .op_i(op), .y_o(y));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t model(input alu_op_e o, input word_t x, input word_t z);
    longint unsigned ux = 64'(x), uz = 64'(z);
    longint sx = longint'($signed(x));
    int s = int'(z[4:0]);
    longint p2 = longint'(1) << s;
    case (o)
      ALU_ADD: return word_t'(ux + uz);
      ALU_SUB: return word_t'(ux + (64'h1_0000_0000 - uz));
      ALU_AND: return x & z;
      ALU_OR : return x | z;
      ALU_NOR: return ~(x | z);
      ALU_XOR: return (x | z) & ~(x & z);
      ALU_SLL: return word_t'(ux * (64'd1 << s));
      ALU_SRL: return word_t'(ux / (64'd1 << s));
      ALU_SRA: return word_t'((sx < 0) ? -((-sx + p2 - 1) / p2) : sx / p2);
      ALU_MUL: return word_t'(ux * uz);
      default: return '0;
    endcase
  endfunction

  task automatic try(input alu_op_e o, input word_t x, input word_t z);
    word_t e;
    op = o; a = x; b = z;
    #1;
    e = model(o, x, z);
    checks++;
    if (y !== e) begin
      failures++;
      if (failures < 20) $display("FAIL %s a=%h b=%h y=%h expected %h", o.name(), x, z, y, e);
    end
  endtask

  initial begin
    word_t corners [6] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h8000_0000, 32'h7fff_ffff, 32'h0000_001f};
    alu_op_e ops [10] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_NOR, ALU_XOR,
                          ALU_SLL, ALU_SRL, ALU_SRA, ALU_MUL};
    foreach (ops[k]) begin
      foreach (corners[i]) foreach (corners[j]) try(ops[k], corners[i], corners[j]);
      for (int n = 0; n < 2000; n++) try(ops[k], $urandom, $urandom);
    end
    // a few values worked by hand
    try(ALU_MUL, 32'd42, 32'd5);        // 210
    try(ALU_SRA, 32'hffff_fff0, 32'd2); // -4
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
