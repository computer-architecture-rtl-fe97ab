// tb_waterfall_examples: runs the four short instruction sequences used to
// explain the scoreboard and poison-bit rules through the whole pipeline:
//   A: 00 add r1,r0,r0 / 04 j 40 / three adds / 40 add r1,r0,r0 / 44 add r2,r1,r0
//   B: as A, but the first instruction is the load ld r1,100(r0), and the
//      data memory has three wait states so the load sits in M for four
//      cycles while the jump's shadow flows past it
//   C: as A with the first instruction writing r3 and the second shadow
//      instruction writing r1 (a register write in the jump's shadow)
//   D: as C with the first shadow instruction writing r1
// The shadow instructions write r1 with the value 7; they must be poisoned.
// Checked for each: only the instructions on the correct path commit, in
// order; r1 and r2 end with the correct-path values; the pipeline does not
// deadlock; the shadow instructions were poisoned; in A the add at 44
// receives r1 from the execute-stage bypass; in C the add at 40 waits
// (write-after-write) until the poisoned writer of r1 in the shadow has
// left writeback and cleared its busy bit. A also checks the timing: the
// jump redirects three cycles after it was fetched, and the target is
// fetched one cycle after the redirect. In B the wrong-path records are
// queued behind the slow load, so the load has left before the add at 40
// reaches register read; the check there is only that nothing deadlocks
// and the order is right.
`timescale 1ns/1ps
module tb_waterfall_examples;
  import uarch_pkg::*;
  import tb_isa_pkg::*;

  logic      clk = 1'b0;
  logic      rst = 1'b1;
  logic      imem_init_we = 1'b0, dmem_init_we = 1'b0;
  Addr       imem_init_addr = '0, dmem_init_addr = '0;
  Data       imem_init_data = '0, dmem_init_data = '0;
  logic      commit_valid, commit_wr_reg, commit_is_store;
  Addr       commit_pc, commit_addr;
  Inum       commit_inum;
  Rindx      commit_rdst;
  Data       commit_data;
  PipeEvents events;

  six_stage_proc #(.MEM_WAIT(3)) u_dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(string what, Data got, Data exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  // Build one sequence: word index -> instruction; unused words stay 0 (no-op).
  task automatic run_seq(string name, logic [31:0] first, logic [31:0] sh1, logic [31:0] sh2,
                         logic [31:0] sh3, Data exp_r1, Data exp_r2, logic want_xbyp, logic want_waw);
    logic [31:0] img [32];
    Addr         exp_pcs [$];
    int          n_commit = 0, n_poison = 0, n_byp = 0, n_waw = 0, cyc = 0;
    int          cyc_fetch_j = -1, cyc_redirect = -1, cyc_fetch_40 = -1;
    foreach (img[i]) img[i] = '0;
    img[0]  = first;                 // 00
    img[1]  = J(32'h40);             // 04
    img[2]  = sh1;                   // 08
    img[3]  = sh2;                   // 0c
    img[4]  = sh3;                   // 10
    img[16] = ADDU(1, 0, 0);         // 40
    img[17] = ADDU(2, 1, 0);         // 44
    img[18] = J(32'h48);             // 48: stop here
    exp_pcs = {32'h00, 32'h04, 32'h40, 32'h44, 32'h48};
    rst <= 1'b1;
    @(posedge clk);
    foreach (img[i]) begin
      imem_init_we <= 1'b1; imem_init_addr <= i * 4; imem_init_data <= img[i];
      @(posedge clk);
    end
    imem_init_we <= 1'b0;
    dmem_init_we <= 1'b1; dmem_init_addr <= 32'd100; dmem_init_data <= 32'h0000_0abc;
    @(posedge clk);
    dmem_init_we <= 1'b0;
    @(posedge clk);
    rst <= 1'b0;
    while (cyc < 200 && n_commit < exp_pcs.size()) begin
      @(posedge clk);
      cyc++;
      n_poison += int'(events.poisoned);
      n_byp    += int'(events.bypass_x);
      n_waw    += int'(events.waw_stall);
      // cycle numbers sampled before this edge's updates
      if (u_dut.fr_enq && u_dut.fr_in.pc == 32'h04 && cyc_fetch_j < 0)  cyc_fetch_j  = cyc;
      if (u_dut.fr_enq && u_dut.fr_in.pc == 32'h40 && cyc_fetch_40 < 0) cyc_fetch_40 = cyc;
      if (events.redirect && cyc_redirect < 0)                          cyc_redirect = cyc;
      if (commit_valid) begin
        check({name, " commit order"}, commit_pc, exp_pcs[n_commit]);
        n_commit++;
      end
    end
    check({name, " all committed (no deadlock)"}, n_commit, exp_pcs.size());
    check({name, " r1"}, u_dut.u_rf.regs[1], exp_r1);
    check({name, " r2"}, u_dut.u_rf.regs[2], exp_r2);
    check({name, " shadow poisoned"}, 32'(n_poison >= 3), 1);
    if (want_waw) check({name, " add at 40 waited for the earlier r1 writer"}, 32'(n_waw > 0), 1);
    if (want_xbyp) check({name, " execute bypass used"}, 32'(n_byp > 0), 1);
    if (want_xbyp) begin
      // no stall in A: F, D, R take one cycle each, so the jump is in
      // execute three cycles after its fetch, and the target is fetched next
      check({name, " jump executed 3 cycles after fetch"}, cyc_redirect - cyc_fetch_j, 3);
      check({name, " target fetched 1 cycle after redirect"}, cyc_fetch_40 - cyc_redirect, 1);
    end
    $display("%s: %0d cycles, %0d poisoned, %0d execute bypasses, %0d waw stalls", name, cyc, n_poison, n_byp, n_waw);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    run_seq("A", ADDU(1, 0, 0), ADDU(4, 0, 0), ADDU(5, 0, 0), ADDU(6, 0, 0), 0, 0, 1, 0);
    run_seq("B", LW(1, 100, 0), ADDU(4, 0, 0), ADDU(5, 0, 0), ADDU(6, 0, 0), 0, 0, 0, 0);
    run_seq("C", ADDU(3, 0, 0), ADDU(4, 0, 0), ADDIU(1, 0, 7), ADDU(6, 0, 0), 0, 0, 0, 1);
    run_seq("D", ADDU(3, 0, 0), ADDIU(1, 0, 7), ADDU(5, 0, 0), ADDU(6, 0, 0), 0, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
