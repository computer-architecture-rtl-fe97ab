// tb_isa_pkg: testbench support for the six-stage pipeline.
//
// - Encoders for the pipeline's MIPS-style instruction subset (written from
//   the encoding, independently of the decoder).
// - IsaModel: an instruction-at-a-time reference model of the same
//   instruction set. Each call of step() executes one instruction and
//   returns what the pipeline should report when that instruction commits.
// - build_program(): a directed program that provokes every pipeline
//   mechanism (bypass from execute and memory, load-use and write-after-write
//   stalls, taken branches and jumps with register writes in their shadow,
//   multiplies), followed by a random stretch of instructions with forward
//   branches only, so that it always reaches the final self-loop.
package tb_isa_pkg;

  localparam int MEM_WORDS = 1024;   // model memory, matches the default size

  // ---- encoders ----
  function automatic logic [31:0] r_type(logic [5:0] fn, int rd, int rs, int rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic logic [31:0] i_type(logic [5:0] op, int rt, int rs, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] ADDU(int rd, int rs, int rt); return r_type(6'h21, rd, rs, rt); endfunction
  function automatic logic [31:0] SUBU(int rd, int rs, int rt); return r_type(6'h23, rd, rs, rt); endfunction
  function automatic logic [31:0] AND_(int rd, int rs, int rt); return r_type(6'h24, rd, rs, rt); endfunction
  function automatic logic [31:0] OR_ (int rd, int rs, int rt); return r_type(6'h25, rd, rs, rt); endfunction
  function automatic logic [31:0] XOR_(int rd, int rs, int rt); return r_type(6'h26, rd, rs, rt); endfunction
  function automatic logic [31:0] SLT (int rd, int rs, int rt); return r_type(6'h2a, rd, rs, rt); endfunction
  function automatic logic [31:0] SLTU(int rd, int rs, int rt); return r_type(6'h2b, rd, rs, rt); endfunction
  function automatic logic [31:0] MUL (int rd, int rs, int rt);
    return {6'h1c, 5'(rs), 5'(rt), 5'(rd), 5'd0, 6'h02};
  endfunction
  function automatic logic [31:0] ADDIU(int rt, int rs, int imm); return i_type(6'h09, rt, rs, imm); endfunction
  function automatic logic [31:0] SLTI (int rt, int rs, int imm); return i_type(6'h0a, rt, rs, imm); endfunction
  function automatic logic [31:0] ANDI (int rt, int rs, int imm); return i_type(6'h0c, rt, rs, imm); endfunction
  function automatic logic [31:0] ORI  (int rt, int rs, int imm); return i_type(6'h0d, rt, rs, imm); endfunction
  function automatic logic [31:0] XORI (int rt, int rs, int imm); return i_type(6'h0e, rt, rs, imm); endfunction
  function automatic logic [31:0] LUI  (int rt, int imm);         return i_type(6'h0f, rt, 0, imm); endfunction
  function automatic logic [31:0] LW   (int rt, int off, int rs); return i_type(6'h23, rt, rs, off); endfunction
  function automatic logic [31:0] SW   (int rt, int off, int rs); return i_type(6'h2b, rt, rs, off); endfunction
  // Branch offsets are in instructions, relative to the next instruction.
  function automatic logic [31:0] BEQ  (int rs, int rt, int off); return i_type(6'h04, rt, rs, off); endfunction
  function automatic logic [31:0] BNE  (int rs, int rt, int off); return i_type(6'h05, rt, rs, off); endfunction
  function automatic logic [31:0] J    (int byte_addr);           return {6'h02, 26'(byte_addr >> 2)}; endfunction

  // What the pipeline reports for one committed instruction.
  typedef struct {
    logic [31:0] pc;
    logic        wr_reg;
    logic [4:0]  rdst;
    logic        is_store;
    logic [31:0] addr;
    logic [31:0] data;
  } commit_t;

  class IsaModel;
    logic [31:0] regs [32];
    logic [31:0] mem  [MEM_WORDS];
    logic [31:0] imem [MEM_WORDS];
    logic [31:0] pc;

    function new();
      foreach (regs[i]) regs[i] = '0;
      foreach (mem[i])  mem[i]  = '0;
      foreach (imem[i]) imem[i] = '0;
      pc = '0;
    endfunction

    function automatic commit_t step();
      commit_t     c;
      logic [31:0] inst = imem[pc[11:2]];
      logic [5:0]  op = inst[31:26], fn = inst[5:0];
      int          rs = inst[25:21], rt = inst[20:16], rd = inst[15:11];
      logic [31:0] a = regs[rs], b = regs[rt];
      logic [31:0] se = {{16{inst[15]}}, inst[15:0]};
      logic [31:0] ze = {16'b0, inst[15:0]};
      logic [31:0] next = pc + 4;
      logic [31:0] res = '0;
      int          dst = -1;
      c = '{pc: pc, wr_reg: 0, rdst: 0, is_store: 0, addr: 0, data: 0};
      case (op)
        6'h00: begin
          dst = rd;
          case (fn)
            6'h21: res = a + b;
            6'h23: res = a - b;
            6'h24: res = a & b;
            6'h25: res = a | b;
            6'h26: res = a ^ b;
            6'h2a: res = ($signed(a) < $signed(b)) ? 1 : 0;
            6'h2b: res = (a < b) ? 1 : 0;
            default: dst = -1;
          endcase
        end
        6'h1c: if (fn == 6'h02) begin dst = rd; res = a * b; end
        6'h09: begin dst = rt; res = a + se; end
        6'h0a: begin dst = rt; res = ($signed(a) < $signed(se)) ? 1 : 0; end
        6'h0c: begin dst = rt; res = a & ze; end
        6'h0d: begin dst = rt; res = a | ze; end
        6'h0e: begin dst = rt; res = a ^ ze; end
        6'h0f: begin dst = rt; res = {inst[15:0], 16'b0}; end
        6'h23: begin dst = rt; c.addr = a + se; res = mem[c.addr[11:2]]; end
        6'h2b: begin
          c.is_store = 1; c.addr = a + se; c.data = b;
          mem[c.addr[11:2]] = b;
        end
        6'h04: if (a == b) next = pc + 4 + {se[29:0], 2'b00};
        6'h05: if (a != b) next = pc + 4 + {se[29:0], 2'b00};
        6'h02: next = {next[31:28], inst[25:0], 2'b00};
        default: ;
      endcase
      if (dst > 0) begin
        regs[dst] = res;
        c.wr_reg  = 1;
        c.rdst    = 5'(dst);
        c.data    = res;
      end
      pc = next;
      return c;
    endfunction
  endclass

  // Directed part first, then `n_random` random instructions, then the
  // self-loop whose byte address is returned in `halt_pc`.
  function automatic void build_program(int unsigned seed, int n_random,
                                        ref logic [31:0] prog[$], output logic [31:0] halt_pc);
    int unsigned s = seed;
    prog = {};
    // bypass from execute and from memory
    prog.push_back(ADDIU(1, 0, 5));
    prog.push_back(ADDIU(2, 1, 7));        // r1 from execute
    prog.push_back(ADDU(3, 1, 2));         // r1 from memory, r2 from execute
    // load-use: stall until the load reaches memory, then bypass from memory
    prog.push_back(LW(4, 0, 0));
    prog.push_back(ADDU(5, 4, 3));
    // write-after-write: r6 is still owned by the load
    prog.push_back(LW(6, 8, 0));
    prog.push_back(ADDIU(6, 0, 1));
    prog.push_back(ADDU(7, 6, 6));
    // multi-cycle unit, its result bypassed from execute
    prog.push_back(MUL(7, 1, 2));
    prog.push_back(ADDU(8, 7, 1));
    prog.push_back(MUL(9, 8, 8));
    prog.push_back(SW(9, 12, 0));
    prog.push_back(LW(10, 12, 0));
    // loop: taken backward branch, wrong-path instructions poisoned
    prog.push_back(ADDIU(11, 0, 3));
    prog.push_back(ADDIU(11, 11, -1));     // loop:
    prog.push_back(ADDU(12, 12, 11));
    prog.push_back(BNE(11, 0, -3));
    // jump with a write of r1 in its shadow (must not take effect)
    prog.push_back(J((prog.size() + 3) * 4));
    prog.push_back(ADDIU(1, 0, 99));
    prog.push_back(ADDIU(13, 0, 77));
    prog.push_back(ADDU(14, 1, 0));        // must see r1 = 5
    prog.push_back(BEQ(0, 0, 1));
    prog.push_back(ADDIU(14, 0, 1));       // shadow of the taken branch
    prog.push_back(SW(14, 16, 0));
    // the remaining operations
    prog.push_back(LUI(15, 16'h8000));
    prog.push_back(ORI(15, 15, 16'h1234));
    prog.push_back(SLT(16, 15, 0));
    prog.push_back(SLTU(17, 15, 0));
    prog.push_back(SLTI(18, 15, -1));
    prog.push_back(ANDI(19, 15, 16'hff));
    prog.push_back(XORI(20, 15, 16'hffff));
    prog.push_back(SUBU(21, 0, 1));
    prog.push_back(AND_(22, 21, 15));
    prog.push_back(OR_(23, 5, 7));
    prog.push_back(XOR_(24, 23, 21));
    prog.push_back(BNE(0, 0, 5));          // not taken
    prog.push_back(BEQ(1, 2, 5));          // not taken
    // random stretch: registers r1..r7, memory words 0..31
    for (int k = 0; k < n_random; k++) begin
      int unsigned r = $urandom(s);
      int kind = r % 16;
      int rd = 1 + (r >> 4) % 7, rs = 1 + (r >> 8) % 7, rt = 1 + (r >> 12) % 7;
      s = r;
      if (kind < 6)       prog.push_back(r_type(6'h21 + 6'((r >> 16) % 3 == 0 ? 0 : 2 + (r >> 16) % 4), rd, rs, rt));
      else if (kind < 8)  prog.push_back(ADDIU(rd, rs, int'($signed(16'(r >> 16)))));
      else if (kind < 9)  prog.push_back(MUL(rd, rs, rt));
      else if (kind < 11) prog.push_back(LW(rd, 4 * ((r >> 16) % 32), 0));
      else if (kind < 13) prog.push_back(SW(rt, 4 * ((r >> 16) % 32), 0));
      else if (kind < 15) prog.push_back(((r >> 20) & 1) ? BEQ(rs, rt, 1 + (r >> 21) % 3)
                                                         : BNE(rs, rt, 1 + (r >> 21) % 3));
      else                prog.push_back(J((prog.size() + 2 + (r >> 21) % 2) * 4));
    end
    // padding so that forward branches near the end land in the program
    repeat (4) prog.push_back(ADDIU(1, 1, 1));
    halt_pc = prog.size() * 4;
    prog.push_back(J(halt_pc));
  endfunction

endpackage
