// tb_regfile: self-checking test of the register file. Random writes and
// reads on both ports are compared with an array model; a read of the
// register written in the same cycle must return the new value, r0 always
// reads zero, and every register reads zero after reset.
`timescale 1ns/1ps
module tb_regfile;
  import uarch_pkg::*;
  logic clk = 0, rst = 1;
  Rindx rd1_idx = 0, rd2_idx = 0, wr_idx = 0;
  Data  rd1_data, rd2_data, wr_data = 0;
  logic wr_en = 0;
  Data  model [NREGS];
  int checks = 0, failures = 0;

  regfile dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, Data got, Data exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  function automatic Data expect_rd(Rindx i);
    if (i == 0) return '0;
    if (wr_en && wr_idx == i) return wr_data;
    return model[i];
  endfunction

  initial begin
    foreach (model[i]) model[i] = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    for (int i = 0; i < NREGS; i++) begin
      rd1_idx = Rindx'(i); #1 check("after reset", rd1_data, '0);
    end
    for (int t = 0; t < 3000; t++) begin
      wr_en   = $urandom % 2;
      wr_idx  = Rindx'($urandom);
      wr_data = $urandom;
      rd1_idx = ($urandom % 4 == 0) ? wr_idx : Rindx'($urandom);
      rd2_idx = Rindx'($urandom);
      #1;
      check("rd1", rd1_data, expect_rd(rd1_idx));
      check("rd2", rd2_data, expect_rd(rd2_idx));
      @(posedge clk);
      if (wr_en && wr_idx != 0) model[wr_idx] = wr_data;
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
