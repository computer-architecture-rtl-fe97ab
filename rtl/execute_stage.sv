// execute_stage: the X stage. Takes the record at the head of rr and
//   - if its epoch differs from the execute epoch (it was fetched down a
//     path already abandoned), marks it poisoned and passes it on without
//     executing it, so that later stages still do their bookkeeping;
//   - otherwise executes it: single-cycle instructions in exec_unit, the
//     multiply in the three-stage multistage_unit. For a taken branch or a
//     jump it redirects fetch to the target and flips the execute epoch.
//   - offers the result of a register-writing instruction that is complete
//     in this stage (ALU or multiply) to register read through the bypass
//     network in the cycle it is enqueued into xr.
// A multi-cycle instruction starts the unit and sets `waiting`; the record
// stays in rr until the response arrives, then leaves with it, so a
// multiply spends three cycles in execute when nothing else holds it up.
// Poisoning, redirect, ALU-only bypass and the waiting flag follow the
// design; bypassing the multiply result as well is this design's choice.
module execute_stage
  import uarch_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  // rr FIFO
  input  logic       in_valid,
  input  RegData     in_first,
  output logic       in_deq,
  // xr FIFO
  output logic       enq,
  output ExecData    enq_data,
  input  logic       enq_ready,
  // redirect to fetch
  output logic       redirect,
  output Addr        redirect_pc,
  // bypass producer
  output BypassValue bypass,
  // events
  output logic       poisoned,
  output logic       mul_start,
  output logic       mul_wait
);
  DecBundle dec;
  EBundle   eres;
  Epoch     e_epoch;
  logic     waiting;
  logic     epoch_change;
  logic     done;
  logic     mul_req_ready, mul_resp_valid;
  Data      mul_resp_data;

  assign dec          = in_first.decInst;
  assign epoch_change = in_first.epoch != e_epoch;

  exec_unit u_exec (
    .dec  (dec),
    .pc   (in_first.pc),
    .src1 (in_first.regInst.src1),
    .src2 (in_first.regInst.src2),
    .res  (eres)
  );

  assign mul_start = in_valid && !waiting && !epoch_change &&
                     dec.i_type == IT_MUL && mul_req_ready;

  multistage_unit u_multi (
    .clk        (clk),
    .rst        (rst),
    .req_valid  (mul_start),
    .req_a      (in_first.regInst.src1),
    .req_b      (in_first.regInst.src2),
    .req_ready  (mul_req_ready),
    .resp_valid (mul_resp_valid),
    .resp_data  (mul_resp_data),
    .resp_deq   (waiting && enq)
  );

  always_comb begin
    enq_data = newExecData(in_first);
    done     = 1'b0;
    if (!waiting) begin
      if (epoch_change) begin
        enq_data.poisoned = 1'b1;
        done              = 1'b1;
      end else if (dec.i_type != IT_MUL) begin
        enq_data.execInst = eres;
        done              = 1'b1;
      end
    end else begin
      enq_data.execInst.data = mul_resp_data;
      done                   = mul_resp_valid;
    end
  end

  assign enq         = in_valid && done && enq_ready;
  assign in_deq      = enq;
  assign redirect    = enq && !enq_data.poisoned && enq_data.execInst.cond;
  assign redirect_pc = enq_data.execInst.addr;
  assign poisoned    = enq && enq_data.poisoned;
  assign mul_wait    = in_valid && waiting && !enq;

  always_comb begin
    bypass.valid  = enq && !enq_data.poisoned && dec.wr_reg && resultInExec(dec);
    bypass.regnum = dec.r_dest;
    bypass.value  = enq_data.execInst.data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      e_epoch <= 1'b0;
      waiting <= 1'b0;
    end else begin
      if (redirect)        e_epoch <= ~e_epoch;
      if (mul_start)       waiting <= 1'b1;
      else if (waiting && enq) waiting <= 1'b0;
    end
  end
endmodule
