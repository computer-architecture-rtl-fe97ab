// tb_pipe_fifo: self-checking test of the two-entry stage FIFO. Random
// enqueue/dequeue traffic is compared with a queue model: `valid` = not
// empty, `first` = oldest record, `enq_ready` = fewer than two records,
// independent of a same-cycle dequeue. A final phase enqueues and dequeues
// every cycle and checks that records stream through at one per cycle with
// a latency of one cycle.
`timescale 1ns/1ps
module tb_pipe_fifo;
  logic       clk = 0, rst = 1;
  logic       enq = 0, deq = 0, enq_ready, valid;
  logic [7:0] enq_data = 0, first;
  int checks = 0, failures = 0;
  logic [7:0] q[$];

  pipe_fifo #(.T(logic [7:0])) dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    for (int t = 0; t < 2000; t++) begin
      deq = valid && ($urandom % 3 != 0);
      #1;
      check("valid", valid, q.size() > 0);
      if (q.size() > 0) check("first", first, q[0]);
      check("enq_ready", enq_ready, q.size() < 2);
      enq      = enq_ready && ($urandom % 2 == 0);
      enq_data = 8'($urandom);
      @(posedge clk);
      if (deq) void'(q.pop_front());
      if (enq) q.push_back(enq_data);
      @(negedge clk);
    end
    // drain, then stream one record per cycle
    enq = 0; deq = valid;
    @(posedge clk); @(negedge clk);
    deq = valid;
    @(posedge clk); @(negedge clk);
    check("drained", valid, 0);
    deq = 0; enq = 1; enq_data = 8'd1;
    @(posedge clk); @(negedge clk);
    for (int t = 2; t < 30; t++) begin
      check("stream valid", valid, 1);
      check("stream first", first, t - 1);
      check("stream ready", enq_ready, 1);
      deq = 1; enq_data = 8'(t);
      @(posedge clk); @(negedge clk);
    end
    enq = 0; deq = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
