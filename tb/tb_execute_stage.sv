// tb_execute_stage: self-checking test of the execute stage. Records are
// presented as the head of rr. Checked: an ALU result goes to xr and to the
// bypass; a taken branch redirects fetch to its target and flips the
// epoch, after which a record of the old epoch is poisoned (no redirect,
// no bypass) and one of the new epoch is executed; a not-taken branch does
// not redirect; a load is not bypassed; a multiply takes three cycles in
// execute, and waits further while xr is full.
`timescale 1ns/1ps
module tb_execute_stage;
  import uarch_pkg::*;
  logic       clk = 0, rst = 1;
  logic       in_valid = 0, in_deq, enq, enq_ready = 1;
  RegData     in_first = '0;
  ExecData    enq_data;
  logic       redirect, poisoned, mul_start, mul_wait;
  Addr        redirect_pc;
  BypassValue bypass;
  int checks = 0, failures = 0;

  execute_stage dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, Data got, Data exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  task automatic set_rec(IType it, logic ep, int rd, Data a, Data b, Data imm = 0);
    in_valid = 1;
    in_first = '0;
    in_first.decInst.i_type   = it;
    in_first.decInst.alu_func = ALU_ADD;
    in_first.decInst.br_func  = BR_EQ;
    in_first.decInst.wr_reg   = rd != 0;
    in_first.decInst.r_dest   = Rindx'(rd);
    in_first.decInst.imm      = imm;
    in_first.regInst.src1     = a;
    in_first.regInst.src2     = b;
    in_first.pc               = 32'h200;
    in_first.epoch            = ep;
  endtask

  task automatic step();
    @(posedge clk); @(negedge clk);
  endtask

  initial begin
    int n;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    // ALU
    set_rec(IT_ALU, 0, 3, 32'd40, 32'd2); #1;
    check("alu enq", 32'(enq), 1); check("alu deq", 32'(in_deq), 1);
    check("alu data", enq_data.execInst.data, 32'd42);
    check("alu not poisoned", 32'(enq_data.poisoned), 0);
    check("alu bypass", 32'(bypass.valid), 1);
    check("alu bypass reg", 32'(bypass.regnum), 3);
    check("alu bypass val", bypass.value, 32'd42);
    check("alu no redirect", 32'(redirect), 0);
    step();
    // not-taken branch
    set_rec(IT_BR, 0, 0, 32'd1, 32'd2, 32'd4); #1;
    check("bnt no redirect", 32'(redirect), 0); check("bnt enq", 32'(enq), 1);
    step();
    // taken branch: target 0x200 + 4 + 4*4
    set_rec(IT_BR, 0, 0, 32'd7, 32'd7, 32'd4); #1;
    check("bt redirect", 32'(redirect), 1);
    check("bt target", redirect_pc, 32'h214);
    check("bt no bypass", 32'(bypass.valid), 0);
    step();
    // old epoch: poisoned
    set_rec(IT_BR, 0, 5, 32'd7, 32'd7, 32'd4);
    in_first.decInst.i_type = IT_ALU; #1;
    check("old epoch enq", 32'(enq), 1);
    check("old epoch poisoned", 32'(enq_data.poisoned), 1);
    check("poisoned pulse", 32'(poisoned), 1);
    check("poisoned no bypass", 32'(bypass.valid), 0);
    check("poisoned no redirect", 32'(redirect), 0);
    step();
    set_rec(IT_BR, 0, 0, 32'd7, 32'd7, 32'd4); #1;
    check("poisoned branch no redirect", 32'(redirect), 0);
    step();
    // new epoch executes
    set_rec(IT_ALU, 1, 4, 32'd1, 32'd1); #1;
    check("new epoch live", 32'(enq_data.poisoned), 0);
    check("new epoch data", enq_data.execInst.data, 32'd2);
    step();
    // load: no bypass from execute
    set_rec(IT_LD, 1, 4, 32'h100, 32'd0, 32'h8); #1;
    check("load addr", enq_data.execInst.addr, 32'h108);
    check("load not bypassed", 32'(bypass.valid), 0);
    step();
    // multiply: three cycles
    set_rec(IT_MUL, 1, 9, 32'd12345, 32'd678); n = 1;
    #1 check("mul start", 32'(mul_start), 1); check("mul not done", 32'(enq), 0);
    while (!enq && n < 10) begin step(); #1; n++; end
    check("mul cycles in execute", n, 3);
    check("mul result", enq_data.execInst.data, 32'd12345 * 32'd678);
    check("mul bypass", 32'(bypass.valid), 1);
    check("mul bypass val", bypass.value, 32'd12345 * 32'd678);
    step();
    // multiply held by a full xr
    set_rec(IT_MUL, 1, 9, 32'd3, 32'd5); enq_ready = 0;
    repeat (5) begin
      #1 check("held mul no enq", 32'(enq), 0);
      step();
    end
    check("waiting pulse", 32'(mul_wait), 1);
    enq_ready = 1; #1;
    check("held mul done", 32'(enq), 1);
    check("held mul result", enq_data.execInst.data, 32'd15);
    step();
    in_valid = 0; #1;
    check("idle", 32'(enq), 0);
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
