// scoreboard: one busy bit per architectural register.
//
// Register read sets the bit of an instruction's destination when it issues
// the instruction (markUnavailable); writeback clears it when that
// instruction leaves the pipe, poisoned or not (markAvailable). The clear is
// visible to the busy lookups in the same cycle ("scoreboard update signaled
// immediately"), and a set and a clear of the same register in one cycle
// leave it busy, since the set belongs to a younger instruction. Because
// register read stalls on a busy destination (write-after-write), at most one
// writer of a register is in flight, so one bit per register suffices.
// Register 0 is never busy. Three combinational lookup ports serve the two
// sources and the destination.
module scoreboard
  import uarch_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic set_en,      // markUnavailable(set_idx)
  input  Rindx set_idx,
  input  logic clr_en,      // markAvailable(clr_idx)
  input  Rindx clr_idx,
  input  Rindx chk1_idx,
  output logic busy1,
  input  Rindx chk2_idx,
  output logic busy2,
  input  Rindx chk3_idx,
  output logic busy3
);
  logic [NREGS-1:0] busy_q;
  logic [NREGS-1:0] busy_now;   // after this cycle's clear

  always_comb begin
    busy_now = busy_q;
    if (clr_en) busy_now[clr_idx] = 1'b0;
    busy_now[0] = 1'b0;
  end

  assign busy1 = busy_now[chk1_idx];
  assign busy2 = busy_now[chk2_idx];
  assign busy3 = busy_now[chk3_idx];

  always_ff @(posedge clk) begin
    if (rst) begin
      busy_q <= '0;
    end else begin
      busy_q <= busy_now;
      if (set_en && set_idx != '0) busy_q[set_idx] <= 1'b1;
    end
  end
endmodule
