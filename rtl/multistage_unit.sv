// multistage_unit: a three-stage pipelined function unit, here a 32x32-bit
// multiplier returning the low 32 bits of the product.
//
// request() performs the first step and enqueues into m1; an internal step
// moves m1 to m2 performing the middle step; response() performs the last
// step on the head of m2 and dequeues it. The steps are
//   M1: partial products  pp0 = a * b[15:0],  pp1 = (a * b[31:16]) mod 2^16
//   M2: lo = pp0[15:0],  hi = pp0[31:16] + pp1   (16-bit sum)
//   M3: result = {hi, lo}
// A request accepted in cycle t gives a response in cycle t+2 when nothing
// is held up. m1 and m2 are two-entry stage FIFOs, so the unit accepts a
// request every cycle while its output is consumed. The three-stage
// structure with m1/m2 follows the design; that the operation is a
// multiply, and its split into steps, are this design's own.
module multistage_unit
  import uarch_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic req_valid,   // request(operand)
  input  Data  req_a,
  input  Data  req_b,
  output logic req_ready,
  output logic resp_valid,  // response()
  output Data  resp_data,
  input  logic resp_deq
);
  typedef struct packed {
    Data         pp0;
    logic [15:0] pp1;
  } State1;

  typedef struct packed {
    logic [15:0] hi;
    logic [15:0] lo;
  } State2;

  function automatic State1 doM1(Data a, Data b);
    State1 s;
    Data   p1;
    s.pp0 = a * {16'b0, b[15:0]};
    p1    = a * {16'b0, b[31:16]};
    s.pp1 = p1[15:0];
    return s;
  endfunction

  function automatic State2 doM2(State1 s);
    State2 t;
    t.lo = s.pp0[15:0];
    t.hi = s.pp0[31:16] + s.pp1;
    return t;
  endfunction

  function automatic Data doM3(State2 t);
    return {t.hi, t.lo};
  endfunction

  logic  m1_valid, m1_enq_ready, m2_valid, m2_enq_ready, s1_fire;
  State1 m1_first;
  State2 m2_first;

  assign req_ready = m1_enq_ready;
  assign s1_fire   = m1_valid && m2_enq_ready;

  pipe_fifo #(.T(State1)) u_m1 (
    .clk       (clk),
    .rst       (rst),
    .enq       (req_valid && m1_enq_ready),
    .enq_data  (doM1(req_a, req_b)),
    .enq_ready (m1_enq_ready),
    .deq       (s1_fire),
    .valid     (m1_valid),
    .first     (m1_first)
  );

  pipe_fifo #(.T(State2)) u_m2 (
    .clk       (clk),
    .rst       (rst),
    .enq       (s1_fire),
    .enq_data  (doM2(m1_first)),
    .enq_ready (m2_enq_ready),
    .deq       (resp_deq),
    .valid     (m2_valid),
    .first     (m2_first)
  );

  assign resp_valid = m2_valid;
  assign resp_data  = doM3(m2_first);
endmodule
