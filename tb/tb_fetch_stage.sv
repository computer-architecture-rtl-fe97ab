// tb_fetch_stage: self-checking test of the fetch stage. An instruction
// memory model returns a word derived from the address. With random
// back-pressure on fr, each enqueued record must carry the word at its pc,
// the running instruction number and the current epoch, and pcs must
// advance by 4. A redirect must move fetch to the target from the next
// cycle on and flip the epoch.
`timescale 1ns/1ps
module tb_fetch_stage;
  import uarch_pkg::*;
  logic     clk = 0, rst = 1;
  Addr      imem_addr;
  Data      imem_rdata;
  logic     redirect = 0;
  Addr      redirect_pc = 0;
  logic     enq, enq_ready = 0;
  FetchData enq_data;
  int checks = 0, failures = 0;
  Addr  exp_pc = 0;
  Inum  exp_inum = 0;
  Epoch exp_epoch = 0;
  int   n_redirect = 0;

  fetch_stage #(.RESET_PC(32'h0000_0040)) dut (.*);
  assign imem_rdata = ~imem_addr ^ 32'h5a5a_0000;
  always #5 clk = ~clk;

  task automatic check(string what, Data got, Data exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    exp_pc = 32'h40;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    for (int t = 0; t < 2000; t++) begin
      enq_ready   = $urandom % 4 != 0;
      redirect    = $urandom % 10 == 0;
      redirect_pc = ($urandom % 256) * 4;
      #1;
      check("enq", enq, enq_ready);
      if (enq) begin
        check("pc", enq_data.pc, exp_pc);
        check("inst", enq_data.fInst.instResp, ~exp_pc ^ 32'h5a5a_0000);
        check("inum", 32'(enq_data.inum), 32'(exp_inum));
        check("epoch", 32'(enq_data.epoch), 32'(exp_epoch));
      end
      @(posedge clk);
      if (enq) exp_inum++;
      if (redirect) begin
        exp_pc = redirect_pc; exp_epoch = ~exp_epoch; n_redirect++;
      end else if (enq) exp_pc += 4;
      @(negedge clk);
    end
    check("redirects exercised", 32'(n_redirect > 0), 1);
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
