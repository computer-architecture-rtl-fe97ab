// fetch_stage: the F stage. Each cycle in which the fr FIFO can take a
// record it reads the instruction word at `pc` from instruction memory and
// enqueues it with its pc, a running instruction number and the fetch epoch,
// then predicts the next pc as pc+4.
//
// A redirect from execute (a taken branch or jump) replaces the prediction
// at the next clock edge and flips the fetch epoch, so every instruction
// fetched down the wrong path carries the old epoch and is recognised, and
// poisoned, by execute. The redirect is held in the `pc` register, as in the
// design's "pc" box between execute and fetch; a record fetched in the cycle
// of the redirect still carries the old epoch. pc+4 prediction, redirect and
// epoch follow the design; the reset pc and the instruction number width are
// this design's own.
module fetch_stage
  import uarch_pkg::*;
#(
  parameter Addr RESET_PC = '0
) (
  input  logic     clk,
  input  logic     rst,
  // instruction memory
  output Addr      imem_addr,
  input  Data      imem_rdata,
  // redirect from execute
  input  logic     redirect,
  input  Addr      redirect_pc,
  // fr FIFO
  output logic     enq,
  output FetchData enq_data,
  input  logic     enq_ready
);
  Addr  pc;
  Epoch f_epoch;
  Inum  inum;

  assign imem_addr = pc;
  assign enq       = enq_ready && !rst;

  always_comb begin
    enq_data                = '0;
    enq_data.fInst.instResp = imem_rdata;
    enq_data.pc             = pc;
    enq_data.inum           = inum;
    enq_data.epoch          = f_epoch;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pc      <= RESET_PC;
      f_epoch <= 1'b0;
      inum    <= '0;
    end else begin
      if (enq) inum <= inum + 1'b1;
      if (redirect) begin
        pc      <= redirect_pc;
        f_epoch <= ~f_epoch;
      end else if (enq) begin
        pc <= pc + 32'd4;
      end
    end
  end
endmodule
