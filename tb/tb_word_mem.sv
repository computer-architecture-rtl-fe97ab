// tb_word_mem: self-checking test of the word memory at a reduced depth of
// 64 words. Random writes and combinational reads are compared with an
// array model; byte-offset bits are ignored and a write is visible from the
// next cycle on.
`timescale 1ns/1ps
module tb_word_mem;
  import uarch_pkg::*;
  localparam int WORDS = 64;
  logic clk = 0, we = 0;
  Addr  raddr = 0, waddr = 0;
  Data  rdata, wdata = 0;
  Data  model [WORDS];
  int checks = 0, failures = 0;

  word_mem #(.WORDS(WORDS)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, Data got, Data exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    @(negedge clk);
    for (int i = 0; i < WORDS; i++) begin
      we = 1; waddr = i * 4; wdata = $urandom; model[i] = wdata;
      @(posedge clk); @(negedge clk);
    end
    for (int t = 0; t < 2000; t++) begin
      we    = $urandom % 2;
      waddr = ($urandom % WORDS) * 4 + $urandom % 4;
      wdata = $urandom;
      raddr = ($urandom % 4 == 0) ? waddr : ($urandom % WORDS) * 4 + $urandom % 4;
      #1 check("read", rdata, model[raddr[7:2]]);
      @(posedge clk);
      if (we) model[waddr[7:2]] = wdata;
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
