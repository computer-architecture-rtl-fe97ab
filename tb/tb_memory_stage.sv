// tb_memory_stage: self-checking test of the memory stage with two wait
// states per access. A data-memory model serves the port. Checked: a load
// returns the stored word and completes after exactly 1 + 2 cycles, a store
// writes memory once, a poisoned load or store passes in one cycle without
// touching memory, an ALU record passes in one cycle and is bypassed, a
// load is bypassed with its data, and nothing moves while mr is full.
`timescale 1ns/1ps
module tb_memory_stage;
  import uarch_pkg::*;
  localparam int WAIT = 2;
  logic       clk = 0, rst = 1;
  logic       in_valid = 0, in_deq, enq, enq_ready = 1;
  ExecData    in_first = '0;
  MemData     enq_data;
  Addr        dmem_addr;
  Data        dmem_rdata, dmem_wdata;
  logic       dmem_we, mem_wait;
  BypassValue bypass;
  Data        mem [64];
  int checks = 0, failures = 0, n_writes = 0;

  memory_stage #(.MEM_WAIT(WAIT)) dut (.*);
  assign dmem_rdata = mem[dmem_addr[7:2]];
  always @(posedge clk) if (dmem_we) begin mem[dmem_addr[7:2]] <= dmem_wdata; n_writes++; end
  always #5 clk = ~clk;

  task automatic check(string what, Data got, Data exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  task automatic set_rec(IType it, logic pois, int rd, Addr a, Data d);
    in_valid = 1;
    in_first = '0;
    in_first.decInst.i_type = it;
    in_first.decInst.wr_reg = rd != 0;
    in_first.decInst.r_dest = Rindx'(rd);
    in_first.execInst.addr  = a;
    in_first.execInst.data  = d;
    in_first.poisoned       = pois;
  endtask

  // cycles until the record leaves (1 = same cycle)
  task automatic run(output int n);
    n = 1;
    #1;
    while (!enq && n < 20) begin @(posedge clk); @(negedge clk); #1; n++; end
  endtask

  task automatic step();
    @(posedge clk); @(negedge clk);
  endtask

  initial begin
    int n;
    foreach (mem[i]) mem[i] = 32'h5000_0000 + i;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    set_rec(IT_LD, 0, 7, 32'h20, 0);  run(n);
    check("load cycles", n, 1 + WAIT);
    check("load data", enq_data.execInst.data, 32'h5000_0008);
    check("load bypass", 32'(bypass.valid), 1);
    check("load bypass val", bypass.value, 32'h5000_0008);
    step();
    set_rec(IT_ST, 0, 0, 32'h24, 32'hdead_beef); run(n);
    check("store cycles", n, 1 + WAIT);
    check("store we", 32'(dmem_we), 1);
    step();
    check("store written", mem[9], 32'hdead_beef);
    check("one write", n_writes, 1);
    set_rec(IT_ST, 1, 0, 32'h28, 32'h1111_1111); run(n);
    check("poisoned store cycles", n, 1);
    check("poisoned store no we", 32'(dmem_we), 0);
    step();
    check("poisoned store no write", mem[10], 32'h5000_000a);
    set_rec(IT_LD, 1, 7, 32'h20, 32'h77); run(n);
    check("poisoned load cycles", n, 1);
    check("poisoned load data kept", enq_data.execInst.data, 32'h77);
    check("poisoned no bypass", 32'(bypass.valid), 0);
    step();
    set_rec(IT_ALU, 0, 3, 32'h0, 32'h99); run(n);
    check("alu cycles", n, 1);
    check("alu bypass", 32'(bypass.valid), 1);
    check("alu bypass reg", 32'(bypass.regnum), 3);
    check("alu bypass val", bypass.value, 32'h99);
    step();
    set_rec(IT_ALU, 0, 3, 32'h0, 32'h99); enq_ready = 0; #1;
    check("held by mr", 32'(enq), 0); check("held no deq", 32'(in_deq), 0);
    enq_ready = 1;
    set_rec(IT_LD, 0, 7, 32'h24, 0); step();
    check("wait pulse", 32'(mem_wait), 1);
    run(n);
    check("second load data", enq_data.execInst.data, 32'hdead_beef);
    step();
    in_valid = 0;
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
