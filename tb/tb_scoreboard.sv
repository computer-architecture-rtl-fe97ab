// tb_scoreboard: self-checking test of the busy-bit scoreboard. Random
// set (issue) and clear (writeback) requests are compared with a bit-vector
// model: lookups see this cycle's clear, a simultaneous set of the same
// register wins, and r0 is never busy.
`timescale 1ns/1ps
module tb_scoreboard;
  import uarch_pkg::*;
  logic clk = 0, rst = 1;
  logic set_en = 0, clr_en = 0;
  Rindx set_idx = 0, clr_idx = 0, chk1_idx = 0, chk2_idx = 0, chk3_idx = 0;
  logic busy1, busy2, busy3;
  logic [NREGS-1:0] model = '0;
  int checks = 0, failures = 0;

  scoreboard dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  function automatic logic exp_busy(Rindx i);
    if (i == 0) return 1'b0;
    if (clr_en && clr_idx == i) return 1'b0;
    return model[i];
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    for (int t = 0; t < 3000; t++) begin
      set_en  = $urandom % 2;  set_idx = Rindx'($urandom % 8);
      clr_en  = $urandom % 2;  clr_idx = ($urandom % 4 == 0) ? set_idx : Rindx'($urandom % 8);
      chk1_idx = Rindx'($urandom % 8);
      chk2_idx = clr_idx;
      chk3_idx = set_idx;
      #1;
      check("busy1", busy1, exp_busy(chk1_idx));
      check("busy2", busy2, exp_busy(chk2_idx));
      check("busy3", busy3, exp_busy(chk3_idx));
      @(posedge clk);
      if (clr_en) model[clr_idx] = 1'b0;
      if (set_en && set_idx != 0) model[set_idx] = 1'b1;
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
