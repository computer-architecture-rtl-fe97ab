// six_stage_proc: an in-order six-stage processor pipeline
//   F (fetch) -fr- D (decode) -dr- R (register read) -rr- X (execute)
//   -xr- M (memory) -mr- W (writeback)
// with a scoreboard for data hazards, epochs and poison bits for wrong-path
// instructions, full bypassing, and a multi-cycle unit inside execute.
//
// How it works. Fetch predicts pc+4. Register read issues an instruction
// only when its destination is free and each source is either free in the
// scoreboard or offered by the bypass network this cycle; it then marks the
// destination busy. Execute resolves branches and jumps: on a taken one it
// redirects fetch and flips its epoch, and every later-arriving record of
// the old epoch is marked poisoned instead of being dropped. Poisoned
// records flow on, make no memory or register change, but still clear their
// destination's busy bit in writeback, so no younger instruction waits
// forever for a register that a killed instruction had claimed. Execute and
// memory bypass the values they complete to register read; writeback writes
// the register file, whose reads see that write in the same cycle.
//
// Interface. Both memories are loaded through the *_init ports (intended
// while rst is high); after rst falls the pipeline starts fetching at
// RESET_PC. Each completed, unpoisoned instruction is reported on the
// commit_* outputs in program order, and `events` gives one-cycle pulses
// for stalls, bypasses, redirects, poisoning and multi-cycle waits.
// The stage structure, scoreboard, epochs, poison bits and bypass paths
// follow the design; the instruction set, memory sizes and the optional
// memory wait states are this design's own.
module six_stage_proc
  import uarch_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter int unsigned MEM_WAIT   = 0,
  parameter Addr         RESET_PC   = '0
) (
  input  logic      clk,
  input  logic      rst,
  // memory loading
  input  logic      imem_init_we,
  input  Addr       imem_init_addr,
  input  Data       imem_init_data,
  input  logic      dmem_init_we,
  input  Addr       dmem_init_addr,
  input  Data       dmem_init_data,
  // commit trace
  output logic      commit_valid,
  output Addr       commit_pc,
  output Inum       commit_inum,
  output logic      commit_wr_reg,
  output Rindx      commit_rdst,
  output logic      commit_is_store,
  output Addr       commit_addr,
  output Data       commit_data,
  // mechanism pulses
  output PipeEvents events
);
  // ---- pipeline FIFOs ----
  logic     fr_enq, fr_rdy, fr_deq, fr_valid;
  FetchData fr_in, fr_first;
  logic     dr_enq, dr_rdy, dr_deq, dr_valid;
  DecData   dr_in, dr_first;
  logic     rr_enq, rr_rdy, rr_deq, rr_valid;
  RegData   rr_in, rr_first;
  logic     xr_enq, xr_rdy, xr_deq, xr_valid;
  ExecData  xr_in, xr_first;
  logic     mr_enq, mr_rdy, mr_deq, mr_valid;
  MemData   mr_in, mr_first;

  pipe_fifo #(.T(FetchData)) u_fr (.clk, .rst, .enq(fr_enq), .enq_data(fr_in), .enq_ready(fr_rdy),
                                   .deq(fr_deq), .valid(fr_valid), .first(fr_first));
  pipe_fifo #(.T(DecData))   u_dr (.clk, .rst, .enq(dr_enq), .enq_data(dr_in), .enq_ready(dr_rdy),
                                   .deq(dr_deq), .valid(dr_valid), .first(dr_first));
  pipe_fifo #(.T(RegData))   u_rr (.clk, .rst, .enq(rr_enq), .enq_data(rr_in), .enq_ready(rr_rdy),
                                   .deq(rr_deq), .valid(rr_valid), .first(rr_first));
  pipe_fifo #(.T(ExecData))  u_xr (.clk, .rst, .enq(xr_enq), .enq_data(xr_in), .enq_ready(xr_rdy),
                                   .deq(xr_deq), .valid(xr_valid), .first(xr_first));
  pipe_fifo #(.T(MemData))   u_mr (.clk, .rst, .enq(mr_enq), .enq_data(mr_in), .enq_ready(mr_rdy),
                                   .deq(mr_deq), .valid(mr_valid), .first(mr_first));

  // ---- memories ----
  Addr  imem_addr, dmem_addr;
  Data  imem_rdata, dmem_rdata, dmem_wdata;
  logic dmem_we;

  word_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .raddr(imem_addr), .rdata(imem_rdata),
    .we(imem_init_we), .waddr(imem_init_addr), .wdata(imem_init_data));

  word_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .raddr(dmem_addr), .rdata(dmem_rdata),
    .we(dmem_we || dmem_init_we),
    .waddr(dmem_we ? dmem_addr : dmem_init_addr),
    .wdata(dmem_we ? dmem_wdata : dmem_init_data));

  // ---- register file, bypass network ----
  Rindx       rf_rd1_idx, rf_rd2_idx, rf_widx, sb_clr_idx;
  Data        rf_rd1_data, rf_rd2_data, rf_wdata;
  logic       rf_we, sb_clr_en;
  BypassValue byp_prod [2];   // [0] execute (youngest), [1] memory
  Rindx       byp1_idx, byp2_idx;
  logic       byp1_valid, byp2_valid;
  Data        byp1_value, byp2_value;
  logic [1:0] byp1_sel, byp2_sel;
  logic       byp1_used, byp2_used;

  regfile u_rf (
    .clk, .rst,
    .rd1_idx(rf_rd1_idx), .rd1_data(rf_rd1_data),
    .rd2_idx(rf_rd2_idx), .rd2_data(rf_rd2_data),
    .wr_en(rf_we), .wr_idx(rf_widx), .wr_data(rf_wdata));

  bypass_net #(.NPROD(2)) u_byp (
    .prod(byp_prod),
    .cons1_idx(byp1_idx), .cons1_valid(byp1_valid), .cons1_value(byp1_value), .cons1_sel(byp1_sel),
    .cons2_idx(byp2_idx), .cons2_valid(byp2_valid), .cons2_value(byp2_value), .cons2_sel(byp2_sel));

  // ---- stages ----
  logic redirect;
  Addr  redirect_pc;

  fetch_stage #(.RESET_PC(RESET_PC)) u_f (
    .clk, .rst, .imem_addr(imem_addr), .imem_rdata(imem_rdata),
    .redirect(redirect), .redirect_pc(redirect_pc),
    .enq(fr_enq), .enq_data(fr_in), .enq_ready(fr_rdy));

  decode_stage u_d (
    .in_valid(fr_valid), .in_first(fr_first), .in_deq(fr_deq),
    .enq(dr_enq), .enq_data(dr_in), .enq_ready(dr_rdy));

  regread_stage u_r (
    .clk, .rst,
    .in_valid(dr_valid), .in_first(dr_first), .in_deq(dr_deq),
    .enq(rr_enq), .enq_data(rr_in), .enq_ready(rr_rdy),
    .rf_rd1_idx(rf_rd1_idx), .rf_rd1_data(rf_rd1_data),
    .rf_rd2_idx(rf_rd2_idx), .rf_rd2_data(rf_rd2_data),
    .byp1_idx(byp1_idx), .byp1_valid(byp1_valid), .byp1_value(byp1_value),
    .byp2_idx(byp2_idx), .byp2_valid(byp2_valid), .byp2_value(byp2_value),
    .sb_clr_en(sb_clr_en), .sb_clr_idx(sb_clr_idx),
    .raw_stall(events.raw_stall), .waw_stall(events.waw_stall),
    .byp1_used(byp1_used), .byp2_used(byp2_used));

  execute_stage u_x (
    .clk, .rst,
    .in_valid(rr_valid), .in_first(rr_first), .in_deq(rr_deq),
    .enq(xr_enq), .enq_data(xr_in), .enq_ready(xr_rdy),
    .redirect(redirect), .redirect_pc(redirect_pc),
    .bypass(byp_prod[0]),
    .poisoned(events.poisoned), .mul_start(events.mul_start), .mul_wait(events.mul_wait));

  memory_stage #(.MEM_WAIT(MEM_WAIT)) u_m (
    .clk, .rst,
    .in_valid(xr_valid), .in_first(xr_first), .in_deq(xr_deq),
    .enq(mr_enq), .enq_data(mr_in), .enq_ready(mr_rdy),
    .dmem_addr(dmem_addr), .dmem_rdata(dmem_rdata), .dmem_we(dmem_we), .dmem_wdata(dmem_wdata),
    .bypass(byp_prod[1]), .mem_wait(events.mem_wait));

  writeback_stage u_w (
    .in_valid(mr_valid), .in_first(mr_first), .in_deq(mr_deq),
    .sb_clr_en(sb_clr_en), .sb_clr_idx(sb_clr_idx),
    .rf_we(rf_we), .rf_widx(rf_widx), .rf_wdata(rf_wdata),
    .commit_valid, .commit_pc, .commit_inum, .commit_wr_reg, .commit_rdst,
    .commit_is_store, .commit_addr, .commit_data);

  assign events.redirect = redirect;
  assign events.bypass_x = (byp1_used && byp1_sel[0]) || (byp2_used && byp2_sel[0]);
  assign events.bypass_m = (byp1_used && byp1_sel[1]) || (byp2_used && byp2_sel[1]);
endmodule
