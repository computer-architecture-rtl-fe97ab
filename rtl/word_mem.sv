// word_mem: word-addressed memory used as instruction memory and as data
// memory.
//
// Reads are combinational (the addressed word appears in the same cycle);
// writes happen at the clock edge. Byte address bits [1:0] are ignored and
// addresses wrap modulo the memory size. The contents are not reset; the
// user loads them through the write port before starting the pipeline.
// Word size, depth, and same-cycle read are this design's choices.
module word_mem
  import uarch_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic clk,
  input  Addr  raddr,     // byte address
  output Data  rdata,
  input  logic we,
  input  Addr  waddr,     // byte address
  input  Data  wdata
);
  localparam int unsigned AW = $clog2(WORDS);

  Data mem [WORDS];

  assign rdata = mem[raddr[AW+1:2]];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[AW+1:2]] <= wdata;
  end
endmodule
