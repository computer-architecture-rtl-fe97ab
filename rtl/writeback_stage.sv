// writeback_stage: the W stage. Takes one record from mr every cycle one is
// there. For every record that has a destination register, poisoned or
// not, it clears the destination's busy bit in the scoreboard (bookkeeping);
// only for a record that is not poisoned does it write the register file
// (architectural change). Both act directly on register read in the same
// cycle, not through a FIFO.
//
// The commit outputs report each instruction that completes unpoisoned, in
// program order, for observation and checking; they are this design's own.
module writeback_stage
  import uarch_pkg::*;
(
  // mr FIFO
  input  logic   in_valid,
  input  MemData in_first,
  output logic   in_deq,
  // scoreboard bookkeeping
  output logic   sb_clr_en,
  output Rindx   sb_clr_idx,
  // register file write
  output logic   rf_we,
  output Rindx   rf_widx,
  output Data    rf_wdata,
  // commit trace
  output logic   commit_valid,
  output Addr    commit_pc,
  output Inum    commit_inum,
  output logic   commit_wr_reg,
  output Rindx   commit_rdst,
  output logic   commit_is_store,
  output Addr    commit_addr,
  output Data    commit_data    // register value written, or store data
);
  DecBundle dec;

  assign dec        = in_first.decInst;
  assign in_deq     = in_valid;
  assign sb_clr_en  = in_valid && dec.wr_reg;
  assign sb_clr_idx = dec.r_dest;
  assign rf_we      = in_valid && !in_first.poisoned && dec.wr_reg;
  assign rf_widx    = dec.r_dest;
  assign rf_wdata   = in_first.execInst.data;

  assign commit_valid    = in_valid && !in_first.poisoned;
  assign commit_pc       = in_first.pc;
  assign commit_inum     = in_first.inum;
  assign commit_wr_reg   = dec.wr_reg;
  assign commit_rdst     = dec.r_dest;
  assign commit_is_store = dec.i_type == IT_ST;
  assign commit_addr     = in_first.execInst.addr;
  assign commit_data     = in_first.execInst.data;
endmodule
