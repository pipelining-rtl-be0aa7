// y86_pkg: types and constants shared by the Y86-64 pipelines.
// Holds the instruction codes (icode), ALU function codes, status codes,
// the register-number conventions (0xF = no register, 4 = %rsp) and the
// contents of the four pipeline registers of the five-stage pipeline
// (fetch->decode, decode->execute, execute->memory, memory->writeback),
// together with their "bubble" (no-op) default values.
// The icode numbering and instruction encoding follow the Y86-64 ISA; the
// exact field list of each pipeline register follows the per-stage tables of
// the design (icode, rA/rB, valA/valB, valE, dstE ...), plus what the other
// instructions need (ifun, valC, valP, dstM, valM, stat, cnd).
package y86_pkg;

  typedef enum logic [3:0] {
    I_HALT   = 4'h0,
    I_NOP    = 4'h1,
    I_RRMOVQ = 4'h2,   // also cmovXX
    I_IRMOVQ = 4'h3,
    I_RMMOVQ = 4'h4,
    I_MRMOVQ = 4'h5,
    I_OPQ    = 4'h6,
    I_JXX    = 4'h7,
    I_CALL   = 4'h8,
    I_RET    = 4'h9,
    I_PUSHQ  = 4'hA,
    I_POPQ   = 4'hB
  } icode_t;

  typedef enum logic [3:0] {
    ALU_ADD = 4'h0,
    ALU_SUB = 4'h1,
    ALU_AND = 4'h2,
    ALU_XOR = 4'h3
  } alufun_t;

  // Condition function codes shared by jXX and cmovXX.
  typedef enum logic [3:0] {
    C_ALWAYS = 4'h0,
    C_LE     = 4'h1,
    C_L      = 4'h2,
    C_E      = 4'h3,
    C_NE     = 4'h4,
    C_GE     = 4'h5,
    C_G      = 4'h6
  } cond_t;

  typedef enum logic [1:0] {
    S_AOK = 2'd0,   // normal operation
    S_HLT = 2'd1,   // halt instruction reached writeback
    S_ADR = 2'd2,   // bad instruction or data address
    S_INS = 2'd3    // invalid instruction code
  } stat_t;

  localparam logic [3:0] REG_NONE = 4'hF;
  localparam logic [3:0] REG_RSP  = 4'h4;

  typedef struct packed {
    logic zf;
    logic sf;
    logic of;
  } cc_t;

  // fetch -> decode (register fD)
  typedef struct packed {
    stat_t       stat;
    logic [3:0]  icode;
    logic [3:0]  ifun;
    logic [3:0]  rA;
    logic [3:0]  rB;
    logic [63:0] valC;
    logic [63:0] valP;
  } fd_t;

  // decode -> execute (register dE)
  typedef struct packed {
    stat_t       stat;
    logic [3:0]  icode;
    logic [3:0]  ifun;
    logic [63:0] valC;
    logic [63:0] valA;
    logic [63:0] valB;
    logic [3:0]  dstE;
    logic [3:0]  dstM;
  } de_t;

  // execute -> memory (register eM)
  typedef struct packed {
    stat_t       stat;
    logic [3:0]  icode;
    logic [3:0]  ifun;
    logic        cnd;
    logic [63:0] valE;
    logic [63:0] valA;
    logic [3:0]  dstE;
    logic [3:0]  dstM;
  } em_t;

  // memory -> writeback (register mW)
  typedef struct packed {
    stat_t       stat;
    logic [3:0]  icode;
    logic [63:0] valE;
    logic [63:0] valM;
    logic [3:0]  dstE;
    logic [3:0]  dstM;
  } mw_t;

  // Bubble (default) values: a nop that names no register.
  localparam fd_t FD_BUBBLE = '{stat: S_AOK, icode: I_NOP, ifun: 4'h0,
                                rA: REG_NONE, rB: REG_NONE, valC: 64'd0, valP: 64'd0};
  localparam de_t DE_BUBBLE = '{stat: S_AOK, icode: I_NOP, ifun: 4'h0, valC: 64'd0,
                                valA: 64'd0, valB: 64'd0, dstE: REG_NONE, dstM: REG_NONE};
  localparam em_t EM_BUBBLE = '{stat: S_AOK, icode: I_NOP, ifun: 4'h0, cnd: 1'b0,
                                valE: 64'd0, valA: 64'd0, dstE: REG_NONE, dstM: REG_NONE};
  localparam mw_t MW_BUBBLE = '{stat: S_AOK, icode: I_NOP, valE: 64'd0, valM: 64'd0,
                                dstE: REG_NONE, dstM: REG_NONE};

endpackage
