// decode_stage: the D stage. Takes a fetched record from fr, decodes its
// instruction word into a DecBundle and enqueues the extended record into
// dr, one instruction per cycle when dr can take it.
//
// Decoding is combinational. Operand fields an instruction does not read are
// set to register 0, which is never busy, so register read only waits for
// registers that are really read. Unknown encodings decode as a no-op. The
// DecBundle fields r_dest, op1 and op2 follow the design; the instruction set
// (a MIPS-style subset, see uarch_pkg) and the remaining fields are this
// design's own.
module decode_stage
  import uarch_pkg::*;
(
  // fr FIFO
  input  logic     in_valid,
  input  FetchData in_first,
  output logic     in_deq,
  // dr FIFO
  output logic     enq,
  output DecData   enq_data,
  input  logic     enq_ready
);
  function automatic DecBundle decode(Data inst);
    DecBundle   d = '0;
    logic [5:0] opc = inst[31:26];
    logic [5:0] fn  = inst[5:0];
    Rindx       rs  = inst[25:21];
    Rindx       rt  = inst[20:16];
    Rindx       rd  = inst[15:11];
    Data        sext = {{16{inst[15]}}, inst[15:0]};
    Data        zext = {16'b0, inst[15:0]};
    d.i_type = IT_NOP;
    unique case (opc)
      OP_SPECIAL: begin
        d.i_type = IT_ALU; d.op1 = rs; d.op2 = rt; d.r_dest = rd; d.wr_reg = 1'b1;
        unique case (fn)
          FN_ADDU: d.alu_func = ALU_ADD;
          FN_SUBU: d.alu_func = ALU_SUB;
          FN_AND:  d.alu_func = ALU_AND;
          FN_OR:   d.alu_func = ALU_OR;
          FN_XOR:  d.alu_func = ALU_XOR;
          FN_SLT:  d.alu_func = ALU_SLT;
          FN_SLTU: d.alu_func = ALU_SLTU;
          default: begin d = '0; d.i_type = IT_NOP; end
        endcase
      end
      OP_SPECIAL2: begin
        if (fn == FN2_MUL) begin
          d.i_type = IT_MUL; d.op1 = rs; d.op2 = rt; d.r_dest = rd; d.wr_reg = 1'b1;
        end
      end
      OP_ADDIU, OP_SLTI, OP_ANDI, OP_ORI, OP_XORI, OP_LUI: begin
        d.i_type = IT_ALU; d.op1 = rs; d.r_dest = rt; d.wr_reg = 1'b1; d.use_imm = 1'b1;
        d.imm = sext;
        unique case (opc)
          OP_ADDIU: d.alu_func = ALU_ADD;
          OP_SLTI:  d.alu_func = ALU_SLT;
          OP_ANDI:  begin d.alu_func = ALU_AND; d.imm = zext; end
          OP_ORI:   begin d.alu_func = ALU_OR;  d.imm = zext; end
          OP_XORI:  begin d.alu_func = ALU_XOR; d.imm = zext; end
          default:  begin d.alu_func = ALU_LUI; d.op1 = '0; d.imm = {inst[15:0], 16'b0}; end
        endcase
      end
      OP_LW: begin
        d.i_type = IT_LD; d.op1 = rs; d.r_dest = rt; d.wr_reg = 1'b1; d.imm = sext;
      end
      OP_SW: begin
        d.i_type = IT_ST; d.op1 = rs; d.op2 = rt; d.imm = sext;
      end
      OP_BEQ, OP_BNE: begin
        d.i_type  = IT_BR; d.op1 = rs; d.op2 = rt; d.imm = sext;
        d.br_func = (opc == OP_BEQ) ? BR_EQ : BR_NE;
      end
      OP_J: begin
        d.i_type = IT_J; d.imm = {6'b0, inst[25:0]};
      end
      default: ;
    endcase
    // Writes to r0 are dropped here, so r0 is never marked busy.
    if (d.r_dest == '0) d.wr_reg = 1'b0;
    return d;
  endfunction

  assign enq    = in_valid && enq_ready;
  assign in_deq = enq;

  always_comb begin
    enq_data         = newDecData(in_first);
    enq_data.decInst = decode(in_first.fInst.instResp);
  end
endmodule
