// regfile: architectural register file, two combinational read ports and one
// write port driven directly by the writeback stage (not through a FIFO).
//
// A read of the register being written in the same cycle returns the new
// value, so a consumer in register read that is released by writeback in
// that cycle reads the value writeback is storing. Register 0 always reads as
// zero and is never written. Writes take effect at the clock edge. All
// registers reset to zero. Reading through the write, r0 and the reset value
// are this design's choices.
module regfile
  import uarch_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  Rindx rd1_idx,
  output Data  rd1_data,
  input  Rindx rd2_idx,
  output Data  rd2_data,
  input  logic wr_en,
  input  Rindx wr_idx,
  input  Data  wr_data
);
  Data regs [NREGS];

  function automatic Data rd(Rindx idx, logic we, Rindx widx, Data wdata, Data stored);
    if (idx == '0)                return '0;
    else if (we && widx == idx)   return wdata;
    else                          return stored;
  endfunction

  assign rd1_data = rd(rd1_idx, wr_en, wr_idx, wr_data, regs[rd1_idx]);
  assign rd2_data = rd(rd2_idx, wr_en, wr_idx, wr_data, regs[rd2_idx]);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (wr_en && wr_idx != '0) begin
      regs[wr_idx] <= wr_data;
    end
  end
endmodule
