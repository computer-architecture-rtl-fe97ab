// tb_six_stage_full: end-to-end test of the six-stage pipeline with every
// parameter at its default (single-cycle data memory, 1024-word memories).
//
// Same procedure as tb_six_stage_proc, with another random program: the
// program is loaded while reset is held, each committed instruction is
// compared in order with the reference model (pc, destination register and
// value, store address and data), the final register file is compared, and
// every pipeline mechanism except memory wait states (none at the default)
// must have occurred.
`timescale 1ns/1ps
module tb_six_stage_full;
  import uarch_pkg::*;
  import tb_isa_pkg::*;

  localparam int N_RANDOM  = 600;
  localparam int WATCHDOG  = 40000;

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

  six_stage_proc u_dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycles = 0, commits = 0;
  int n_raw = 0, n_waw = 0, n_byp_x = 0, n_byp_m = 0, n_redirect = 0;
  int n_poison = 0, n_mul = 0, n_mul_wait = 0, n_mem_wait = 0;
  logic done = 1'b0;

  IsaModel        model;
  logic [31:0]    prog[$];
  logic [31:0]    halt_pc;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %s: got %h expected %h (commit %0d, pc %h)", what, got, exp, commits, commit_pc);
    end
  endtask

  initial begin
    model = new();
    build_program(32'd777, N_RANDOM, prog, halt_pc);
    // data memory: word i holds a pattern
    for (int i = 0; i < 64; i++) model.mem[i] = 32'h1000_0000 + i * 32'h0101;
    foreach (prog[i]) model.imem[i] = prog[i];
    repeat (2) @(posedge clk);
    foreach (prog[i]) begin
      imem_init_we <= 1'b1; imem_init_addr <= i * 4; imem_init_data <= prog[i];
      @(posedge clk);
    end
    imem_init_we <= 1'b0;
    for (int i = 0; i < 64; i++) begin
      dmem_init_we <= 1'b1; dmem_init_addr <= i * 4; dmem_init_data <= model.mem[i];
      @(posedge clk);
    end
    dmem_init_we <= 1'b0;
    @(posedge clk);
    rst <= 1'b0;
  end

  // Compare each commit with the model.
  always @(posedge clk) begin
    if (!rst && !done) begin
      cycles++;
      n_raw      += int'(events.raw_stall);
      n_waw      += int'(events.waw_stall);
      n_byp_x    += int'(events.bypass_x);
      n_byp_m    += int'(events.bypass_m);
      n_redirect += int'(events.redirect);
      n_poison   += int'(events.poisoned);
      n_mul      += int'(events.mul_start);
      n_mul_wait += int'(events.mul_wait);
      n_mem_wait += int'(events.mem_wait);
      if (commit_valid) begin
        commit_t c;
        c = model.step();
        check("pc", commit_pc, c.pc);
        check("wr_reg", 32'(commit_wr_reg), 32'(c.wr_reg));
        if (c.wr_reg) begin
          check("rdst", 32'(commit_rdst), 32'(c.rdst));
          check("reg value", commit_data, c.data);
        end
        check("is_store", 32'(commit_is_store), 32'(c.is_store));
        if (c.is_store) begin
          check("store addr", commit_addr, c.addr);
          check("store data", commit_data, c.data);
        end
        commits++;
        if (commit_pc == halt_pc) done <= 1'b1;
      end
    end
  end

  initial begin
    wait (done);
    @(posedge clk);
    // values fixed by the directed part
    check("r14 after jump shadow", model.regs[14], 32'd5);
    for (int r = 0; r < 32; r++) check($sformatf("final r%0d", r), u_dut.u_rf.regs[r], model.regs[r]);
    $display("cycles=%0d commits=%0d raw=%0d waw=%0d byp_x=%0d byp_m=%0d redirect=%0d poison=%0d mul=%0d mul_wait=%0d mem_wait=%0d",
             cycles, commits, n_raw, n_waw, n_byp_x, n_byp_m, n_redirect, n_poison, n_mul, n_mul_wait, n_mem_wait);
    check("raw stalls seen",      32'(n_raw > 0), 1);
    check("waw stalls seen",      32'(n_waw > 0), 1);
    check("execute bypass seen",  32'(n_byp_x > 0), 1);
    check("memory bypass seen",   32'(n_byp_m > 0), 1);
    check("redirects seen",       32'(n_redirect > 0), 1);
    check("poisoning seen",       32'(n_poison > 0), 1);
    check("multi-cycle seen",     32'(n_mul > 0), 1);
    check("multi-cycle wait seen",32'(n_mul_wait > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog: halt not reached after %0d cycles (%0d commits)", WATCHDOG, commits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
