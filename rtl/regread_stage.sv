// regread_stage: the R stage with its "read regs" logic and the scoreboard.
//
// For the record at the head of dr it reads both source registers from the
// register file and asks the bypass network for both. It stalls (dr is held,
// nothing is enqueued) when
//   - the destination is still busy in the scoreboard (write-after-write), or
//   - a source is busy and no bypass offers its value (read-after-write).
// Otherwise each source takes the bypassed value when one is offered and the
// register-file value if not, the record goes to rr, and the destination is
// marked busy. Writeback clears a busy bit through `sb_clr_*`; the clear is
// seen by the lookups in the same cycle. The stall condition and the choice
// of bypass over register file follow the design's register-read listing.
// The stage never reads the epoch: wrong-path records are issued and killed
// later, and still set and clear their busy bits.
module regread_stage
  import uarch_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  // dr FIFO
  input  logic   in_valid,
  input  DecData in_first,
  output logic   in_deq,
  // rr FIFO
  output logic   enq,
  output RegData enq_data,
  input  logic   enq_ready,
  // register file read ports
  output Rindx   rf_rd1_idx,
  input  Data    rf_rd1_data,
  output Rindx   rf_rd2_idx,
  input  Data    rf_rd2_data,
  // bypass network consumer ports
  output Rindx   byp1_idx,
  input  logic   byp1_valid,
  input  Data    byp1_value,
  output Rindx   byp2_idx,
  input  logic   byp2_valid,
  input  Data    byp2_value,
  // scoreboard clear from writeback
  input  logic   sb_clr_en,
  input  Rindx   sb_clr_idx,
  // events
  output logic   raw_stall,
  output logic   waw_stall,
  output logic   byp1_used,   // source 1 of the issued record was bypassed
  output logic   byp2_used
);
  DecBundle dec;
  logic     busy1, busy2, busy_dst;
  logic     stall;

  assign dec        = in_first.decInst;
  assign rf_rd1_idx = dec.op1;
  assign rf_rd2_idx = dec.op2;
  assign byp1_idx   = dec.op1;
  assign byp2_idx   = dec.op2;

  scoreboard u_sb (
    .clk      (clk),
    .rst      (rst),
    .set_en   (enq && dec.wr_reg),
    .set_idx  (dec.r_dest),
    .clr_en   (sb_clr_en),
    .clr_idx  (sb_clr_idx),
    .chk1_idx (dec.op1),
    .busy1    (busy1),
    .chk2_idx (dec.op2),
    .busy2    (busy2),
    .chk3_idx (dec.r_dest),
    .busy3    (busy_dst)
  );

  assign waw_stall = in_valid && dec.wr_reg && busy_dst;
  assign raw_stall = in_valid && ((busy1 && !byp1_valid) || (busy2 && !byp2_valid));
  assign stall     = waw_stall || raw_stall;

  assign enq       = in_valid && enq_ready && !stall;
  assign in_deq    = enq;
  assign byp1_used = enq && busy1;
  assign byp2_used = enq && busy2;

  always_comb begin
    enq_data              = newRegData(in_first);
    enq_data.regInst.src1 = byp1_valid ? byp1_value : rf_rd1_data;
    enq_data.regInst.src2 = byp2_valid ? byp2_value : rf_rd2_data;
  end
endmodule
