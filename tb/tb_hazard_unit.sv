// tb_hazard_unit: directed cases (plain flow, load-use, taken branch with and
// without a simultaneous stall, halt in each stage) and random inputs checked
// against the pipeline-control rules:
//   load-use  = a valid load in EX writes a nonzero register read by ID
//   halt      = HLT valid in ID, EX, MEM or WB, or already halted
//   take      = valid taken branch in MEM: redirect PC, flush IF_ID, ID_EX, EX_MEM
//   otherwise load-use holds PC and IF_ID and bubbles ID_EX; halt holds the
//   PC and bubbles IF_ID.
module tb_hazard_unit;
  import mips_pkg::*;
  logic idv, idh, idrs, idrt, exv, exl, exh, memv, memh, memt, wbh, hlt;
  reg_idx_t idrs_a, idrt_a, exd;
  logic pch, pct, ifh, ifl, idf, exf, lu;
  int checks = 0, failures = 0;

  hazard_unit dut (.id_valid_i(idv), .id_is_halt_i(idh), .id_reads_rs_i(idrs),
                   .id_reads_rt_i(idrt), .id_rs_i(idrs_a), .id_rt_i(idrt_a),
                   .ex_valid_i(exv), .ex_is_load_i(exl), .ex_is_halt_i(exh), .ex_dest_i(exd),
                   .mem_valid_i(memv), .mem_is_halt_i(memh), .mem_take_i(memt),
                   .wb_is_halt_i(wbh), .halted_i(hlt),
                   .pc_hold_o(pch), .pc_take_o(pct), .if_id_hold_o(ifh), .if_id_flush_o(ifl),
                   .id_ex_flush_o(idf), .ex_mem_flush_o(exf), .load_use_o(lu));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string what);
    bit e_lu   = exv && exl && exd != 0 && idv &&
                 ((idrs && idrs_a == exd) || (idrt && idrt_a == exd));
    bit e_halt = (idv && idh) || (exv && exh) || (memv && memh) || wbh || hlt;
    bit e_take = memv && memt;
    bit [6:0] e = {e_take ? 1'b0 : (e_lu || e_halt),   // pc hold
                   e_take,                             // pc take
                   e_take ? 1'b0 : e_lu,               // if_id hold
                   e_take || (e_halt && !e_lu),        // if_id flush
                   e_take || e_lu,                     // id_ex flush
                   e_take,                             // ex_mem flush
                   e_lu};
    #1;
    checks++;
    if ({pch, pct, ifh, ifl, idf, exf, lu} !== e) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %b expected %b", what,
                                  {pch, pct, ifh, ifl, idf, exf, lu}, e);
    end
  endtask

  task automatic clear();
    {idv, idh, idrs, idrt, exv, exl, exh, memv, memh, memt, wbh, hlt} = '0;
    idrs_a = 0; idrt_a = 0; exd = 0;
  endtask

  initial begin
    // plain flow: nothing asserted
    clear(); idv = 1; idrs = 1; idrs_a = 3; exv = 1; exd = 3; compare("no hazard");
    checks++; if ({pch, pct, ifh, ifl, idf, exf, lu} !== 7'b0) failures++;
    // load-use
    exl = 1; compare("load-use");
    checks++; if (!(lu && pch && ifh && idf && !ifl)) failures++;
    // load to R0 is no hazard
    exd = 0; idrs_a = 0; compare("load to R0");
    // taken branch overrides the stall
    exd = 3; idrs_a = 3; memv = 1; memt = 1; compare("take + load-use");
    checks++; if (!(pct && ifl && idf && exf && !pch && !ifh)) failures++;
    // halt in each stage
    clear(); idv = 1; idh = 1; compare("halt ID");
    checks++; if (!(pch && ifl && !idf)) failures++;
    clear(); exv = 1; exh = 1; compare("halt EX");
    clear(); memv = 1; memh = 1; compare("halt MEM");
    clear(); wbh = 1; compare("halt WB");
    clear(); hlt = 1; compare("halted");
    // random
    for (int n = 0; n < 20000; n++) begin
      {idv, idh, idrs, idrt, exv, exl, exh, memv, memh, memt, wbh, hlt} = 12'($urandom);
      if ($urandom_range(0, 1) == 1) begin idh = 0; exh = 0; memh = 0; wbh = 0; hlt = 0; end
      if ($urandom_range(0, 1) == 1) memt = 0;
      idrs_a = reg_idx_t'($urandom_range(0, 3)); idrt_a = reg_idx_t'($urandom_range(0, 3));
      exd = reg_idx_t'($urandom_range(0, 3));
      compare("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
