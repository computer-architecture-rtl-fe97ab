// tb_writeback_stage: self-checking test of the writeback stage. For random
// records it checks that a record is always consumed, that the busy bit of
// its destination is cleared whether or not it is poisoned, that only an
// unpoisoned record writes the register file and is reported as committed,
// and that the commit fields carry the record's pc, destination and data.
`timescale 1ns/1ps
module tb_writeback_stage;
  import uarch_pkg::*;
  logic   in_valid, in_deq, sb_clr_en, rf_we;
  MemData in_first;
  Rindx   sb_clr_idx, rf_widx, commit_rdst;
  Data    rf_wdata, commit_data;
  logic   commit_valid, commit_wr_reg, commit_is_store;
  Addr    commit_pc, commit_addr;
  Inum    commit_inum;
  int checks = 0, failures = 0;

  writeback_stage dut (.*);

  task automatic check(string what, Data got, Data exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    for (int t = 0; t < 2000; t++) begin
      in_valid = $urandom % 4 != 0;
      in_first = '0;
      in_first.poisoned        = $urandom % 2;
      in_first.decInst.i_type  = ($urandom % 3 == 0) ? IT_ST : IT_ALU;
      in_first.decInst.wr_reg  = in_first.decInst.i_type != IT_ST && ($urandom % 4 != 0);
      in_first.decInst.r_dest  = Rindx'($urandom);
      in_first.execInst.data   = $urandom;
      in_first.execInst.addr   = $urandom;
      in_first.pc              = $urandom;
      in_first.inum            = Inum'($urandom);
      #1;
      check("deq", 32'(in_deq), 32'(in_valid));
      check("sb clear", 32'(sb_clr_en), 32'(in_valid && in_first.decInst.wr_reg));
      if (sb_clr_en) check("sb idx", 32'(sb_clr_idx), 32'(in_first.decInst.r_dest));
      check("rf we", 32'(rf_we), 32'(in_valid && !in_first.poisoned && in_first.decInst.wr_reg));
      if (rf_we) begin
        check("rf idx", 32'(rf_widx), 32'(in_first.decInst.r_dest));
        check("rf data", rf_wdata, in_first.execInst.data);
      end
      check("commit", 32'(commit_valid), 32'(in_valid && !in_first.poisoned));
      if (commit_valid) begin
        check("commit pc", commit_pc, in_first.pc);
        check("commit inum", 32'(commit_inum), 32'(in_first.inum));
        check("commit store", 32'(commit_is_store), 32'(in_first.decInst.i_type == IT_ST));
        check("commit data", commit_data, in_first.execInst.data);
        check("commit addr", commit_addr, in_first.execInst.addr);
        check("commit wr", 32'(commit_wr_reg), 32'(in_first.decInst.wr_reg));
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
