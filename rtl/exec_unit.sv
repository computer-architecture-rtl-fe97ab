// exec_unit: the single-cycle execute function. From the decoded
// instruction, its pc and its two source values it computes the EBundle:
//   - ALU instructions: `data` is the ALU result;
//   - loads and stores: `addr` = src1 + immediate, `data` = store value;
//   - branches: `cond` is set when the branch is taken, `addr` = pc + 4 +
//     4 * immediate;
//   - jumps: `cond` is always set, `addr` = the upper four bits of pc + 4
//     followed by the 26-bit target and two zero bits.
// Since fetch always predicts pc+4, `cond` means "redirect fetch to addr".
// Purely combinational. The EBundle fields follow the design; the
// operations are those of this design's instruction set.
module exec_unit
  import uarch_pkg::*;
(
  input  DecBundle dec,
  input  Addr      pc,
  input  Data      src1,
  input  Data      src2,
  output EBundle   res
);
  Data b;
  Data alu_out;
  Addr pc4;

  assign b   = dec.use_imm ? dec.imm : src2;
  assign pc4 = pc + 32'd4;

  always_comb begin
    unique case (dec.alu_func)
      ALU_ADD:  alu_out = src1 + b;
      ALU_SUB:  alu_out = src1 - b;
      ALU_AND:  alu_out = src1 & b;
      ALU_OR:   alu_out = src1 | b;
      ALU_XOR:  alu_out = src1 ^ b;
      ALU_SLT:  alu_out = {31'b0, $signed(src1) < $signed(b)};
      ALU_SLTU: alu_out = {31'b0, src1 < b};
      default:  alu_out = b;   // ALU_LUI: immediate already shifted
    endcase
  end

  always_comb begin
    res = '0;
    unique case (dec.i_type)
      IT_ALU: res.data = alu_out;
      IT_LD:  res.addr = src1 + dec.imm;
      IT_ST: begin
        res.addr = src1 + dec.imm;
        res.data = src2;
      end
      IT_BR: begin
        res.cond = (dec.br_func == BR_EQ) ? (src1 == src2) : (src1 != src2);
        res.addr = pc4 + {dec.imm[29:0], 2'b00};
      end
      IT_J: begin
        res.cond = 1'b1;
        res.addr = {pc4[31:28], dec.imm[25:0], 2'b00};
      end
      default: ;
    endcase
  end
endmodule
