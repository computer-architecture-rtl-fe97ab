// uarch_pkg: types and constants shared by the six-stage pipeline.
//
// The per-stage bundles follow the split used by the design: architectural
// state produced by one stage (FBundle from fetch, DecBundle from decode,
// RegBundle from register read, EBundle from execute) is copied unchanged
// into every later stage's record, next to the micro-architectural state
// (instruction number, epoch, poison bit). The record of each pipeline
// register (fr, dr, rr, xr, mr) is therefore a superset of the one before it.
//
// The bundle names and the fields r_dest/op1/op2, src1/src2, cond/addr/data,
// inum, epoch and poisoned follow the design. The instruction set is this
// design's own choice: a small 32-bit MIPS-style subset (32 registers, r0
// reads as zero, no branch delay slot) with ADDU, SUBU, AND, OR, XOR, SLT,
// SLTU, MUL, ADDIU, SLTI, ANDI, ORI, XORI, LUI, LW, SW, BEQ, BNE and J.
package uarch_pkg;

  localparam int unsigned XLEN     = 32;  // data and address width
  localparam int unsigned NREGS    = 32;  // architectural registers
  localparam int unsigned RIDX_W   = $clog2(NREGS);
  localparam int unsigned INUM_W   = 16;  // instruction number, for tracing

  typedef logic [XLEN-1:0]   Data;
  typedef logic [XLEN-1:0]   Addr;
  typedef logic [RIDX_W-1:0] Rindx;
  typedef logic [INUM_W-1:0] Inum;
  typedef logic              Epoch;

  // Instruction classes seen by the later stages.
  typedef enum logic [2:0] {
    IT_ALU = 3'd0,  // single-cycle register result
    IT_MUL = 3'd1,  // multi-cycle register result
    IT_LD  = 3'd2,
    IT_ST  = 3'd3,
    IT_BR  = 3'd4,  // conditional branch
    IT_J   = 3'd5,  // unconditional jump
    IT_NOP = 3'd6
  } IType;

  typedef enum logic [2:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_SLT, ALU_SLTU, ALU_LUI
  } AluFunc;

  typedef enum logic {BR_EQ, BR_NE} BrFunc;

  // Opcode and function-field values of the instruction set.
  localparam logic [5:0] OP_SPECIAL  = 6'h00;
  localparam logic [5:0] OP_SPECIAL2 = 6'h1c;
  localparam logic [5:0] OP_J        = 6'h02;
  localparam logic [5:0] OP_BEQ      = 6'h04;
  localparam logic [5:0] OP_BNE      = 6'h05;
  localparam logic [5:0] OP_ADDIU    = 6'h09;
  localparam logic [5:0] OP_SLTI     = 6'h0a;
  localparam logic [5:0] OP_ANDI     = 6'h0c;
  localparam logic [5:0] OP_ORI      = 6'h0d;
  localparam logic [5:0] OP_XORI     = 6'h0e;
  localparam logic [5:0] OP_LUI      = 6'h0f;
  localparam logic [5:0] OP_LW       = 6'h23;
  localparam logic [5:0] OP_SW       = 6'h2b;
  localparam logic [5:0] FN_ADDU     = 6'h21;
  localparam logic [5:0] FN_SUBU     = 6'h23;
  localparam logic [5:0] FN_AND      = 6'h24;
  localparam logic [5:0] FN_OR       = 6'h25;
  localparam logic [5:0] FN_XOR      = 6'h26;
  localparam logic [5:0] FN_SLT      = 6'h2a;
  localparam logic [5:0] FN_SLTU     = 6'h2b;
  localparam logic [5:0] FN2_MUL     = 6'h02;

  // ---- architectural state, one bundle per producing stage ----
  typedef struct packed {
    Data instResp;        // instruction word returned by instruction memory
  } FBundle;

  typedef struct packed {
    IType   i_type;
    AluFunc alu_func;
    BrFunc  br_func;
    logic   wr_reg;       // writes r_dest
    Rindx   r_dest;
    Rindx   op1;
    Rindx   op2;
    logic   use_imm;      // second ALU operand is imm instead of src2
    Data    imm;          // extended immediate, or jump target
  } DecBundle;

  typedef struct packed {
    Data src1;
    Data src2;
  } RegBundle;

  typedef struct packed {
    logic cond;           // control transfer taken: redirect fetch to addr
    Addr  addr;           // branch/jump target or memory address
    Data  data;           // register result or store data
  } EBundle;

  // ---- per-stage records: prior architectural state + micro-arch state ----
  typedef struct packed {
    FBundle fInst;
    Addr    pc;
    Inum    inum;
    Epoch   epoch;
  } FetchData;

  typedef struct packed {
    FBundle   fInst;
    DecBundle decInst;
    Addr      pc;
    Inum      inum;
    Epoch     epoch;
  } DecData;

  typedef struct packed {
    FBundle   fInst;
    DecBundle decInst;
    RegBundle regInst;
    Addr      pc;
    Inum      inum;
    Epoch     epoch;
  } RegData;

  typedef struct packed {
    FBundle   fInst;
    DecBundle decInst;
    RegBundle regInst;
    EBundle   execInst;
    Addr      pc;
    Inum      inum;
    Epoch     epoch;
    logic     poisoned;   // killed in execute; later stages only do bookkeeping
  } ExecData;

  typedef ExecData MemData;   // memory stage only rewrites execInst.data

  // A value produced this cycle for a register, offered to register read.
  typedef struct packed {
    logic valid;
    Rindx regnum;
    Data  value;
  } BypassValue;

  // One-cycle pulses that report the pipeline's mechanisms at work.
  typedef struct packed {
    logic raw_stall;    // register read held: a source is busy and not bypassed
    logic waw_stall;    // register read held: the destination is still busy
    logic bypass_x;     // an issued operand came from the execute-stage bypass
    logic bypass_m;     // an issued operand came from the memory-stage bypass
    logic redirect;     // execute redirected fetch and changed the epoch
    logic poisoned;     // execute marked a wrong-path instruction poisoned
    logic mul_start;    // execute started a multi-cycle operation
    logic mul_wait;     // execute waited for the multi-cycle unit
    logic mem_wait;     // memory stage waited for a slow access
  } PipeEvents;

  // Utility functions that open each stage record: copy what earlier stages
  // produced and leave this stage's own fields at zero.
  function automatic DecData newDecData(FetchData f);
    DecData d = '0;
    d.fInst = f.fInst;
    d.pc    = f.pc;
    d.inum  = f.inum;
    d.epoch = f.epoch;
    return d;
  endfunction

  function automatic RegData newRegData(DecData d);
    RegData r = '0;
    r.fInst   = d.fInst;
    r.decInst = d.decInst;
    r.pc      = d.pc;
    r.inum    = d.inum;
    r.epoch   = d.epoch;
    return r;
  endfunction

  function automatic ExecData newExecData(RegData r);
    ExecData e = '0;
    e.fInst   = r.fInst;
    e.decInst = r.decInst;
    e.regInst = r.regInst;
    e.pc      = r.pc;
    e.inum    = r.inum;
    e.epoch   = r.epoch;
    return e;
  endfunction

  // Instructions whose register result is ready at the end of execute.
  function automatic logic resultInExec(DecBundle d);
    return d.i_type inside {IT_ALU, IT_MUL};
  endfunction

endpackage
