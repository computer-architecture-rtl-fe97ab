// tb_regread_stage: self-checking test of the register-read stage. The
// register file is modelled as "register i holds A000_0000 + i"; bypass
// offers and writeback clears are driven by the testbench. A directed part
// walks through: issue and mark busy, read-after-write stall, release by a
// bypass, write-after-write stall, release by a same-cycle writeback clear,
// back-pressure from rr. A random part compares stall/issue decisions and
// source values with a busy-bit model.
`timescale 1ns/1ps
module tb_regread_stage;
  import uarch_pkg::*;
  logic   clk = 0, rst = 1;
  logic   in_valid = 0, in_deq, enq, enq_ready = 1;
  DecData in_first = '0;
  RegData enq_data;
  Rindx   rf_rd1_idx, rf_rd2_idx, byp1_idx, byp2_idx, sb_clr_idx = 0;
  Data    rf_rd1_data, rf_rd2_data, byp1_value = 0, byp2_value = 0;
  logic   byp1_valid = 0, byp2_valid = 0, sb_clr_en = 0;
  logic   raw_stall, waw_stall, byp1_used, byp2_used;
  logic [NREGS-1:0] busy = '0;
  int checks = 0, failures = 0;

  regread_stage dut (.*);
  assign rf_rd1_data = 32'ha000_0000 + 32'(rf_rd1_idx);
  assign rf_rd2_data = 32'ha000_0000 + 32'(rf_rd2_idx);
  always #5 clk = ~clk;

  task automatic check(string what, Data got, Data exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  task automatic set_inst(logic wr, int rd, int o1, int o2);
    in_valid = 1;
    in_first = '0;
    in_first.decInst.i_type = IT_ALU;
    in_first.decInst.wr_reg = wr;
    in_first.decInst.r_dest = Rindx'(rd);
    in_first.decInst.op1    = Rindx'(o1);
    in_first.decInst.op2    = Rindx'(o2);
    in_first.pc             = 32'($urandom);
  endtask

  task automatic step();
    @(posedge clk); @(negedge clk);
    byp1_valid = 0; byp2_valid = 0; sb_clr_en = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    // 1: issue, r5 becomes busy
    set_inst(1, 5, 1, 2); #1;
    check("issue", 32'(enq), 1); check("deq", 32'(in_deq), 1);
    check("src1 from rf", enq_data.regInst.src1, 32'ha000_0001);
    check("src2 from rf", enq_data.regInst.src2, 32'ha000_0002);
    check("pc copied", enq_data.pc, in_first.pc);
    step();
    // 2: read-after-write on r5
    set_inst(1, 6, 5, 0); #1;
    check("raw stall", 32'(raw_stall), 1); check("no issue", 32'(enq), 0); check("no deq", 32'(in_deq), 0);
    step();
    // 3: bypass releases it
    set_inst(1, 6, 5, 0);
    byp1_valid = 1; byp1_value = 32'h1234_5678; #1;
    check("bypass release", 32'(enq), 1); check("byp used", 32'(byp1_used), 1);
    check("src1 bypassed", enq_data.regInst.src1, 32'h1234_5678);
    step();
    // 4: write-after-write on r6
    set_inst(1, 6, 0, 0); #1;
    check("waw stall", 32'(waw_stall), 1); check("no issue (waw)", 32'(enq), 0);
    step();
    // 5: writeback clears r6 in the same cycle
    set_inst(1, 6, 0, 0);
    sb_clr_en = 1; sb_clr_idx = 6; #1;
    check("released by clear", 32'(enq), 1);
    step();
    // 6: r6 must be busy again (set wins over clear)
    set_inst(0, 0, 0, 6); #1;
    check("busy again", 32'(raw_stall), 1);
    byp2_valid = 1; byp2_value = 32'hcafe_f00d; #1;
    check("src2 bypassed", enq_data.regInst.src2, 32'hcafe_f00d);
    check("byp2 used", 32'(byp2_used), 1);
    check("issue via byp2", 32'(enq), 1);
    step();
    // 7: back-pressure
    set_inst(0, 0, 1, 2); enq_ready = 0; #1;
    check("held by rr", 32'(enq), 0); check("held deq", 32'(in_deq), 0);
    enq_ready = 1;
    // clear everything
    for (int r = 1; r < NREGS; r++) begin
      in_valid = 0; sb_clr_en = 1; sb_clr_idx = Rindx'(r); step();
    end
    // random phase on registers r0..r3
    for (int t = 0; t < 3000; t++) begin
      logic wr, e_stall, b1, b2;
      int rd, o1, o2;
      wr = $urandom % 2; rd = $urandom % 4; o1 = $urandom % 4; o2 = $urandom % 4;
      set_inst(wr && rd != 0, rd, o1, o2);
      in_valid   = $urandom % 8 != 0;
      enq_ready  = $urandom % 8 != 0;
      sb_clr_en  = $urandom % 3 == 0;  sb_clr_idx = Rindx'($urandom % 4);
      byp1_valid = $urandom % 3 == 0;  byp1_value = $urandom;
      byp2_valid = $urandom % 3 == 0;  byp2_value = $urandom;
      #1;
      b1 = busy[o1] && !(sb_clr_en && sb_clr_idx == Rindx'(o1)) && o1 != 0;
      b2 = busy[o2] && !(sb_clr_en && sb_clr_idx == Rindx'(o2)) && o2 != 0;
      e_stall = ((wr && rd != 0) && busy[rd] && !(sb_clr_en && sb_clr_idx == Rindx'(rd)))
                || (b1 && !byp1_valid) || (b2 && !byp2_valid);
      check("rand issue", 32'(enq), 32'(in_valid && enq_ready && !e_stall));
      if (enq) begin
        check("rand src1", enq_data.regInst.src1, byp1_valid ? byp1_value : 32'ha000_0000 + o1);
        check("rand src2", enq_data.regInst.src2, byp2_valid ? byp2_value : 32'ha000_0000 + o2);
      end
      @(posedge clk);
      if (sb_clr_en) busy[sb_clr_idx] = 0;
      if (enq && wr && rd != 0) busy[rd] = 1;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
