// tb_multistage_unit: self-checking test of the three-stage multiply unit.
// A single request must produce its response exactly two cycles later
// (three cycles including the request cycle). A stream of back-to-back
// requests with random stalls at the response side must return every
// product, in order, and equal to the low 32 bits of a * b.
`timescale 1ns/1ps
module tb_multistage_unit;
  import uarch_pkg::*;
  logic clk = 0, rst = 1;
  logic req_valid = 0, req_ready, resp_valid, resp_deq = 0;
  Data  req_a = 0, req_b = 0, resp_data;
  Data  q[$];
  int checks = 0, failures = 0, sent = 0, got = 0;

  multistage_unit dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, Data g, Data e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s: got %h exp %h", what, g, e); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    // latency
    req_valid = 1; req_a = 32'd1234567; req_b = 32'd7654321;
    #1 check("idle ready", 32'(req_ready), 1);
    @(posedge clk); @(negedge clk);
    req_valid = 0;
    check("not yet (+1)", 32'(resp_valid), 0);
    @(posedge clk); @(negedge clk);
    check("response at +2", 32'(resp_valid), 1);
    check("product", resp_data, 32'd1234567 * 32'd7654321);
    resp_deq = 1;
    @(posedge clk); @(negedge clk);
    resp_deq = 0;
    check("drained", 32'(resp_valid), 0);
    // stream
    for (int t = 0; t < 3000; t++) begin
      req_valid = sent < 1000;
      req_a = ($urandom % 3 == 0) ? 32'($urandom % 65536) : $urandom;
      req_b = $urandom;
      resp_deq = resp_valid && ($urandom % 4 != 0);
      #1;
      if (resp_deq) begin
        check("stream product", resp_data, q.pop_front());
        got++;
      end
      if (req_valid && req_ready) begin
        q.push_back(req_a * req_b);
        sent++;
      end
      @(posedge clk); @(negedge clk);
    end
    check("all returned", got, 1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
