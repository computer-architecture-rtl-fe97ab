// memory_stage: the M stage. For the record at the head of xr it performs
// the data-memory access of a load or store unless the record is poisoned,
// and passes the record on to mr; a load replaces execInst.data with the
// word read. Poisoned records and non-memory instructions pass straight
// through.
//
// Timing: the memory port reads combinationally and writes at the clock
// edge. To model a slower memory, each access of a live load or store can
// be held for MEM_WAIT extra cycles before it completes (0 by default: one
// cycle per access). The stage offers the value of a register-writing
// record it passes on (a load's data or an earlier ALU result) to register
// read through the bypass network. Skipping the access when poisoned follows
// the design; the wait-state counter is this design's own.
module memory_stage
  import uarch_pkg::*;
#(
  parameter int unsigned MEM_WAIT = 0
) (
  input  logic       clk,
  input  logic       rst,
  // xr FIFO
  input  logic       in_valid,
  input  ExecData    in_first,
  output logic       in_deq,
  // mr FIFO
  output logic       enq,
  output MemData     enq_data,
  input  logic       enq_ready,
  // data memory port
  output Addr        dmem_addr,
  input  Data        dmem_rdata,
  output logic       dmem_we,
  output Data        dmem_wdata,
  // bypass producer
  output BypassValue bypass,
  // events
  output logic       mem_wait
);
  localparam int unsigned CW = (MEM_WAIT > 0) ? $clog2(MEM_WAIT + 1) : 1;

  DecBundle      dec;
  logic          memop;
  logic          access_done;
  logic [CW-1:0] wait_cnt;

  assign dec   = in_first.decInst;
  assign memop = in_valid && !in_first.poisoned && dec.i_type inside {IT_LD, IT_ST};

  if (MEM_WAIT == 0) begin : g_nowait
    assign access_done = 1'b1;
  end else begin : g_wait
    assign access_done = (wait_cnt == CW'(MEM_WAIT));
  end

  assign enq        = in_valid && enq_ready && (!memop || access_done);
  assign in_deq     = enq;
  assign mem_wait   = memop && !access_done;
  assign dmem_addr  = in_first.execInst.addr;
  assign dmem_wdata = in_first.execInst.data;
  assign dmem_we    = enq && memop && dec.i_type == IT_ST;

  always_comb begin
    enq_data = in_first;
    if (memop && dec.i_type == IT_LD) enq_data.execInst.data = dmem_rdata;
  end

  always_comb begin
    bypass.valid  = enq && !in_first.poisoned && dec.wr_reg;
    bypass.regnum = dec.r_dest;
    bypass.value  = enq_data.execInst.data;
  end

  always_ff @(posedge clk) begin
    if (rst || enq || !memop) wait_cnt <= '0;
    else if (!access_done)    wait_cnt <= wait_cnt + 1'b1;
  end
endmodule
