// pipe_fifo: the FIFO between two pipeline stages (fr, dr, rr, xr, mr in
// the main pipe, m1 and m2 inside the multi-cycle unit).
//
// A small circular buffer of DEPTH records (two by default). A stage may
// enqueue whenever the FIFO is not full and the next stage may dequeue
// whenever it is not empty; the two sides are independent, so `enq_ready`
// does not depend on `deq` and no combinational path runs from one stage's
// stall back through the pipeline. With two entries a stream of records
// still moves at one per cycle, and a stage can finish one more record
// while the stage after it is held (the jump executing while a slow load
// sits in memory). An enqueued record is visible at `first` from the next
// cycle. The names and use of the stage FIFOs follow the design; their depth
// is this design's reading of the pipeline diagrams.
module pipe_fifo #(
  parameter type         T     = logic [31:0],
  parameter int unsigned DEPTH = 2
) (
  input  logic clk,
  input  logic rst,
  input  logic enq,        // write `enq_data` (only when enq_ready)
  input  T     enq_data,
  output logic enq_ready,  // not full
  input  logic deq,        // consume `first` (only when valid)
  output logic valid,      // not empty
  output T     first
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                entries [DEPTH];
  logic [PW-1:0]   rd_ptr, wr_ptr;
  logic [PW:0]     count;

  function automatic logic [PW-1:0] incr(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign enq_ready = count != (PW + 1)'(DEPTH);
  assign valid     = count != '0;
  assign first     = entries[rd_ptr];

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (enq) wr_ptr <= incr(wr_ptr);
      if (deq) rd_ptr <= incr(rd_ptr);
      count <= count + (PW + 1)'(enq) - (PW + 1)'(deq);
    end
    if (enq) entries[wr_ptr] <= enq_data;
  end

  // Handshake rules: no enqueue into a full FIFO, no dequeue from an empty one.
  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) enq |-> enq_ready);
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) deq |-> valid);
endmodule
