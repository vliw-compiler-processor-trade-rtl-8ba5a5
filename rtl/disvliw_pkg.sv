// disvliw_pkg: types and constants shared by the DISVLIW processor.
//
// A DISVLIW long instruction holds N_FU slots. Each slot is one 32-bit
// instruction plus two dependency bit vectors of N_FU-1 bits:
//   dpre  - one bit per other functional unit whose earlier instruction this
//           one must wait for;
//   dpost - one bit per other functional unit that runs a later instruction
//           waiting for this one.
// Bit k of a vector held by FU f names FU k when k < f and FU k+1 otherwise,
// so bit 0 is the lowest-numbered other unit. Four units (two integer, two
// long-latency), 4-byte instructions and the vector lengths follow the
// document; the opcode set and the bit layout of the 32-bit instruction are
// this design's own, since the document uses MIPS code without giving an
// encoding.
//
// Instruction word: op[31:26] rd[25:21] rs1[20:16] rs2[15:11], imm[15:0]
// (imm overlaps rs2). Branch and jump targets are absolute long-instruction
// addresses held in imm. Registers and data words are 64 bits wide so that
// one register holds a double; integer and floating-point values share the
// one register file (this design's choice).
package disvliw_pkg;

  localparam int N_FU      = 4;   // 2 integer + 2 floating-point units (Table 1)
  localparam int DEP_W     = N_FU - 1;
  localparam int XLEN      = 64;
  localparam int NREG      = 32;
  localparam int PC_W      = 16;  // long-instruction address width
  localparam int CNT_W     = 4;   // dependency counter width

  typedef enum logic [5:0] {
    OP_NOP  = 6'd0,
    OP_ADD  = 6'd1,
    OP_SUB  = 6'd2,
    OP_AND  = 6'd3,
    OP_OR   = 6'd4,
    OP_XOR  = 6'd5,
    OP_SLT  = 6'd6,
    OP_SLL  = 6'd7,
    OP_SRL  = 6'd8,
    OP_ADDI = 6'd9,
    OP_LUI  = 6'd10,
    OP_LW   = 6'd11,  // rd <= mem[R[rs1]+imm], 64-bit word
    OP_SW   = 6'd12,  // mem[R[rs1]+imm] <= R[rd], 64-bit word
    OP_BEQ  = 6'd13,  // if R[rd]==R[rs1] goto imm
    OP_BNE  = 6'd14,  // if R[rd]!=R[rs1] goto imm
    OP_JMP  = 6'd15,  // goto imm
    OP_MUL  = 6'd16,  // long-latency unit, 64-bit product (low half)
    OP_DIVU = 6'd17,  // long-latency unit, 32-bit unsigned quotient
    OP_REMU = 6'd18,  // long-latency unit, 32-bit unsigned remainder
    OP_FADD = 6'd19,  // long-latency unit, IEEE double rd <= rs1 + rs2
    OP_FSUB = 6'd20,  // long-latency unit, IEEE double rd <= rs1 - rs2
    OP_FMUL = 6'd21,  // long-latency unit, IEEE double rd <= rs1 * rs2
    OP_HALT = 6'd63   // end of program, consumed by the fetch unit
  } op_e;

  typedef struct packed {
    op_e         op;
    logic [4:0]  rd;
    logic [4:0]  rs1;
    logic [15:0] lo;   // rs2 in [15:11] or a 16-bit immediate
  } instr_t;

  // One slot of a long instruction as stored in memory.
  typedef struct packed {
    logic [DEP_W-1:0] dpre;
    instr_t           ins;
    logic [DEP_W-1:0] dpost;
  } slot_t;

  typedef slot_t [N_FU-1:0] long_instr_t;

  // One IQ entry: a slot plus the speculation tag set by the fetch unit.
  typedef struct packed {
    logic  spec;
    slot_t slot;
  } iq_entry_t;

  // Event counters brought out of the top.
  typedef struct packed {
    logic [31:0] cycles;
    logic [31:0] fetched;       // long instructions fetched
    logic [31:0] issued;        // instructions issued by all schedulers
    logic [31:0] dep_stall;     // scheduler-cycles waiting on a counter
    logic [31:0] res_stall;     // scheduler-cycles waiting on a busy unit
    logic [31:0] spec_stall;    // scheduler-cycles holding a speculative store
    logic [31:0] iq_full;       // fetch cycles lost to a full queue
    logic [31:0] branch_hold;   // fetch cycles held behind a branch
    logic [31:0] icache_miss;
    logic [31:0] commits;       // correctly predicted branches
    logic [31:0] mispredicts;
    logic [31:0] fwd_same_fu;   // operands taken from the unit's own EX result
    logic [31:0] rf_bypass;     // operands taken from a same-cycle WB write
    logic [31:0] spec_issued;   // speculative instructions issued
  } perf_t;

  function automatic logic is_branch(op_e op);
    return op == OP_BEQ || op == OP_BNE || op == OP_JMP;
  endfunction

  function automatic logic is_long_op(op_e op);
    return op == OP_MUL || op == OP_DIVU || op == OP_REMU ||
           op == OP_FADD || op == OP_FSUB || op == OP_FMUL;
  endfunction

  function automatic logic writes_rd(op_e op);
    return !(op == OP_NOP || op == OP_SW || is_branch(op) || op == OP_HALT);
  endfunction

  // Register read as the second operand: rs2 for register-register
  // operations, rd for stores and branches.
  function automatic logic [4:0] src2(instr_t i);
    return (i.op == OP_SW || i.op == OP_BEQ || i.op == OP_BNE) ? i.rd : i.lo[15:11];
  endfunction

  // Map bit k of FU f's dependency vector to a FU number.
  function automatic int unsigned dep_fu(int unsigned f, int unsigned k);
    return (k < f) ? k : k + 1;
  endfunction

  // Map FU g (g != f) to its bit position in FU f's dependency vector.
  function automatic int unsigned dep_bit(int unsigned f, int unsigned g);
    return (g < f) ? g : g - 1;
  endfunction

endpackage
