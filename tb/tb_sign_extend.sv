// tb_sign_extend: drives all 65536 immediates through sign_extend and compares
// with the integer value of the 16-bit two's-complement field.
module tb_sign_extend;
  logic [15:0] imm;
  logic [31:0] ext;
  int checks = 0, failures = 0;

  sign_extend dut (.imm_i(imm), .ext_o(ext));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      int expected;
      expected = (v >= 32768) ? v - 65536 : v;
      imm = 16'(v);
      #1;
      checks++;
      if (ext !== 32'(expected)) begin
        failures++;
        if (failures < 10) $display("FAIL imm=%h ext=%h", imm, ext);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
