// tb_bypass_net: self-checking test of the bypass network with two
// producers. Random offers and requests, drawn from a few registers so
// that matches and double matches are common, are compared with the rule:
// a request is served when some producer offers its register, by the
// lowest-numbered such producer, and `sel` names that producer.
`timescale 1ns/1ps
module tb_bypass_net;
  import uarch_pkg::*;
  BypassValue prod [2];
  Rindx       cons1_idx, cons2_idx;
  logic       cons1_valid, cons2_valid;
  Data        cons1_value, cons2_value;
  logic [1:0] cons1_sel, cons2_sel;
  int checks = 0, failures = 0;

  bypass_net #(.NPROD(2)) dut (.*);

  task automatic check(string what, Data got, Data exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  task automatic expect_port(string p, Rindx idx, logic v, Data val, logic [1:0] sel);
    logic e_v = 1'b0; Data e_val = '0; logic [1:0] e_sel = '0;
    if (prod[1].valid && prod[1].regnum == idx) begin e_v = 1; e_val = prod[1].value; e_sel = 2'b10; end
    if (prod[0].valid && prod[0].regnum == idx) begin e_v = 1; e_val = prod[0].value; e_sel = 2'b01; end
    check({p, " valid"}, Data'(v), Data'(e_v));
    if (e_v) check({p, " value"}, val, e_val);
    check({p, " sel"}, Data'(sel), Data'(e_sel));
  endtask

  initial begin
    for (int t = 0; t < 4000; t++) begin
      foreach (prod[i]) begin
        prod[i].valid  = $urandom % 2;
        prod[i].regnum = Rindx'($urandom % 4);
        prod[i].value  = $urandom;
      end
      cons1_idx = Rindx'($urandom % 4);
      cons2_idx = Rindx'($urandom % 4);
      #1;
      expect_port("port1", cons1_idx, cons1_valid, cons1_value, cons1_sel);
      expect_port("port2", cons2_idx, cons2_valid, cons2_value, cons2_sel);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
