// tb_decode_stage: self-checking test of the decode stage. Instructions are
// encoded with the testbench's own encoders and the decoded fields are
// compared with values written out by hand for each instruction class:
// type, ALU function, destination and whether it is written, operand
// registers (0 where unused), immediate. The handshake passes records
// straight through when dr is ready and holds them otherwise.
`timescale 1ns/1ps
module tb_decode_stage;
  import uarch_pkg::*;
  import tb_isa_pkg::*;
  logic     in_valid = 0, in_deq, enq, enq_ready = 0;
  FetchData in_first = '0;
  DecData   enq_data;
  int checks = 0, failures = 0;

  decode_stage dut (.*);

  task automatic check(string what, Data got, Data exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  task automatic expect_dec(string n, logic [31:0] inst, IType it, AluFunc f, logic wr,
                            int rd, int o1, int o2, logic ui, Data imm, logic chk_f = 1);
    DecBundle d;
    in_first.fInst.instResp = inst;
    in_first.pc   = 32'h100;
    in_first.inum = 16'h7;
    in_first.epoch = 1;
    #1;
    d = enq_data.decInst;
    check({n, " type"}, 32'(d.i_type), 32'(it));
    if (chk_f) check({n, " func"}, 32'(d.alu_func), 32'(f));
    check({n, " wr"}, 32'(d.wr_reg), 32'(wr));
    if (wr) check({n, " rd"}, 32'(d.r_dest), rd);
    check({n, " op1"}, 32'(d.op1), o1);
    check({n, " op2"}, 32'(d.op2), o2);
    check({n, " use_imm"}, 32'(d.use_imm), 32'(ui));
    check({n, " imm"}, d.imm, imm);
    check({n, " pc"}, enq_data.pc, 32'h100);
    check({n, " epoch"}, 32'(enq_data.epoch), 1);
    check({n, " inst"}, enq_data.fInst.instResp, inst);
  endtask

  initial begin
    in_valid = 1; enq_ready = 1;
    expect_dec("addu",  ADDU(3, 1, 2),     IT_ALU, ALU_ADD,  1, 3, 1, 2, 0, 0);
    expect_dec("subu",  SUBU(4, 5, 6),     IT_ALU, ALU_SUB,  1, 4, 5, 6, 0, 0);
    expect_dec("and",   AND_(7, 8, 9),     IT_ALU, ALU_AND,  1, 7, 8, 9, 0, 0);
    expect_dec("or",    OR_(7, 8, 9),      IT_ALU, ALU_OR,   1, 7, 8, 9, 0, 0);
    expect_dec("xor",   XOR_(7, 8, 9),     IT_ALU, ALU_XOR,  1, 7, 8, 9, 0, 0);
    expect_dec("slt",   SLT(10, 11, 12),   IT_ALU, ALU_SLT,  1, 10, 11, 12, 0, 0);
    expect_dec("sltu",  SLTU(10, 11, 12),  IT_ALU, ALU_SLTU, 1, 10, 11, 12, 0, 0);
    expect_dec("mul",   MUL(13, 14, 15),   IT_MUL, ALU_ADD,  1, 13, 14, 15, 0, 0, 0);
    expect_dec("addiu", ADDIU(2, 1, -3),   IT_ALU, ALU_ADD,  1, 2, 1, 0, 1, 32'hffff_fffd);
    expect_dec("slti",  SLTI(2, 1, -1),    IT_ALU, ALU_SLT,  1, 2, 1, 0, 1, 32'hffff_ffff);
    expect_dec("andi",  ANDI(2, 1, 16'hff00), IT_ALU, ALU_AND, 1, 2, 1, 0, 1, 32'h0000_ff00);
    expect_dec("ori",   ORI(2, 1, 16'h8001),  IT_ALU, ALU_OR,  1, 2, 1, 0, 1, 32'h0000_8001);
    expect_dec("xori",  XORI(2, 1, 16'h8001), IT_ALU, ALU_XOR, 1, 2, 1, 0, 1, 32'h0000_8001);
    expect_dec("lui",   LUI(9, 16'hbeef),  IT_ALU, ALU_LUI,  1, 9, 0, 0, 1, 32'hbeef_0000);
    expect_dec("lw",    LW(4, -8, 29),     IT_LD,  ALU_ADD,  1, 4, 29, 0, 0, 32'hffff_fff8, 0);
    expect_dec("sw",    SW(4, 12, 29),     IT_ST,  ALU_ADD,  0, 0, 29, 4, 0, 32'h0000_000c, 0);
    expect_dec("beq",   BEQ(1, 2, -2),     IT_BR,  ALU_ADD,  0, 0, 1, 2, 0, 32'hffff_fffe, 0);
    check("beq func", 32'(enq_data.decInst.br_func), 32'(BR_EQ));
    expect_dec("bne",   BNE(1, 2, 5),      IT_BR,  ALU_ADD,  0, 0, 1, 2, 0, 32'h0000_0005, 0);
    check("bne func", 32'(enq_data.decInst.br_func), 32'(BR_NE));
    expect_dec("j",     J(32'h0000_0400),  IT_J,   ALU_ADD,  0, 0, 0, 0, 0, 32'h0000_0100, 0);
    expect_dec("r0 dest", ADDU(0, 1, 2),   IT_ALU, ALU_ADD,  0, 0, 1, 2, 0, 0);
    expect_dec("unknown", 32'hfc00_0000,   IT_NOP, ALU_ADD,  0, 0, 0, 0, 0, 0, 0);
    // handshake
    enq_ready = 0; #1;
    check("held enq", 32'(enq), 0);
    check("held deq", 32'(in_deq), 0);
    enq_ready = 1; in_valid = 0; #1;
    check("empty enq", 32'(enq), 0);
    in_valid = 1; #1;
    check("pass enq", 32'(enq), 1);
    check("pass deq", 32'(in_deq), 1);
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
