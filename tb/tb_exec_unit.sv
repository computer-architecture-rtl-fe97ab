// tb_exec_unit: self-checking test of the single-cycle execute function.
// Random operands go through every ALU function (register and immediate
// forms), loads, stores, both branch kinds and jumps; results, addresses
// and the redirect flag are compared with values computed here.
`timescale 1ns/1ps
module tb_exec_unit;
  import uarch_pkg::*;
  DecBundle dec;
  Addr      pc;
  Data      src1, src2;
  EBundle   res;
  int checks = 0, failures = 0;

  exec_unit dut (.*);

  task automatic check(string what, Data got, Data exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      Data b, e;
      dec = '0;
      pc   = ($urandom % 1024) * 4;
      src1 = ($urandom % 4 == 0) ? 32'($urandom % 4) : $urandom;
      src2 = ($urandom % 4 == 0) ? src1 : $urandom;
      dec.imm     = $urandom;
      dec.use_imm = $urandom % 2;
      case (t % 5)
        0, 1: begin
          dec.i_type   = IT_ALU;
          dec.alu_func = AluFunc'($urandom % 8);
          b = dec.use_imm ? dec.imm : src2;
          case (dec.alu_func)
            ALU_ADD:  e = src1 + b;
            ALU_SUB:  e = src1 - b;
            ALU_AND:  e = src1 & b;
            ALU_OR:   e = src1 | b;
            ALU_XOR:  e = src1 ^ b;
            ALU_SLT:  e = ($signed(src1) < $signed(b)) ? 1 : 0;
            ALU_SLTU: e = (src1 < b) ? 1 : 0;
            default:  e = b;
          endcase
          #1 check("alu", res.data, e);
          check("alu cond", 32'(res.cond), 0);
        end
        2: begin
          dec.i_type = ($urandom % 2) ? IT_LD : IT_ST;
          #1 check("mem addr", res.addr, src1 + dec.imm);
          if (dec.i_type == IT_ST) check("store data", res.data, src2);
          check("mem cond", 32'(res.cond), 0);
        end
        3: begin
          dec.i_type  = IT_BR;
          dec.br_func = BrFunc'($urandom % 2);
          dec.imm     = 32'($signed(16'($urandom)));
          #1 check("br cond", 32'(res.cond),
                   32'(dec.br_func == BR_EQ ? src1 == src2 : src1 != src2));
          check("br target", res.addr, pc + 4 + dec.imm * 4);
        end
        default: begin
          dec.i_type = IT_J;
          dec.imm    = {6'b0, 26'($urandom)};
          pc         = $urandom & 32'hffff_fffc;
          #1 check("j cond", 32'(res.cond), 1);
          check("j target", res.addr, ((pc + 4) & 32'hf000_0000) | (dec.imm << 2));
        end
      endcase
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
