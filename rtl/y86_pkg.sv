// y86_pkg: types and constants shared by the pipelined Y86 blocks.
//
// Register numbers are 4 bits. Number 0xF (REG_NONE) means "no register":
// reading it gives 0 and writing it changes nothing, so a pipeline register
// holding REG_NONE carries a do-nothing instruction (a bubble). Data words
// and the PC are 64 bits, as in the Y86-64 instruction set. Each pipeline
// register is a struct named after the two stages it sits between, with a
// constant giving its reset/bubble value (pP, fD, dE, eW for the addq
// processor). The instruction codes are the standard Y86-64 ones.
package y86_pkg;

  localparam int unsigned WORD_W = 64;
  localparam int unsigned REG_W  = 4;
  localparam int unsigned NREGS  = 15;   // %rax .. %r14; 0xF is REG_NONE

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [REG_W-1:0]  regid_t;

  localparam regid_t REG_NONE = 4'hF;

  // Y86-64 instruction codes (high nibble of the first instruction byte).
  typedef enum logic [3:0] {
    I_HALT   = 4'h0,
    I_NOP    = 4'h1,
    I_RRMOVQ = 4'h2,
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

  // Longest Y86-64 instruction, in bytes: fetch reads this many at the PC.
  localparam int unsigned IBYTES = 10;
  typedef logic [8*IBYTES-1:0] ibytes_t;

  // ---- addq processor pipeline registers ----
  typedef struct packed {
    word_t pc;
  } pP_t;

  typedef struct packed {
    regid_t rA;
    regid_t rB;
  } fD_t;

  typedef struct packed {
    word_t  valA;
    word_t  valB;
    regid_t dstE;
  } dE_t;

  typedef struct packed {
    word_t  valE;
    regid_t dstE;
  } eW_t;

  localparam pP_t PP_INIT = '{pc: '0};
  localparam fD_t FD_INIT = '{rA: REG_NONE, rB: REG_NONE};
  localparam dE_t DE_INIT = '{valA: '0, valB: '0, dstE: REG_NONE};
  localparam eW_t EW_INIT = '{valE: '0, dstE: REG_NONE};

  // ---- OPq + jXX processor (control-hazard variant) ----
  // OPq functions (low nibble of the first byte)
  typedef enum logic [3:0] {
    F_ADD = 4'h0,
    F_SUB = 4'h1,
    F_AND = 4'h2,
    F_XOR = 4'h3
  } alufn_t;

  // jXX conditions (low nibble of the first byte)
  typedef enum logic [3:0] {
    C_JMP = 4'h0,
    C_LE  = 4'h1,
    C_L   = 4'h2,
    C_E   = 4'h3,
    C_NE  = 4'h4,
    C_GE  = 4'h5,
    C_G   = 4'h6
  } cond_t;

  typedef struct packed {
    logic sf;
    logic zf;
  } cc_t;

  localparam cc_t CC_INIT = '{sf: 1'b0, zf: 1'b1};

  typedef struct packed {
    logic   opq;      // an OPq instruction: writes dstE and the flags
    alufn_t fn;
    regid_t rA;
    regid_t rB;
  } fDj_t;

  typedef struct packed {
    logic   opq;
    alufn_t fn;
    word_t  valA;
    word_t  valB;
    regid_t dstE;
  } dEj_t;

  localparam fDj_t FDJ_INIT = '{opq: 1'b0, fn: F_ADD, rA: REG_NONE, rB: REG_NONE};
  localparam dEj_t DEJ_INIT = '{opq: 1'b0, fn: F_ADD, valA: '0, valB: '0, dstE: REG_NONE};

  // ---- memory-stage control: icode carried through fD, dE, eM, mW ----
  typedef struct packed {
    icode_t icode;
  } icode_reg_t;

  typedef struct packed {
    icode_t icode;
    word_t  valE;     // memory address computed by execute
    word_t  valA;     // data to store
  } eM_t;

  typedef struct packed {
    icode_t icode;
    word_t  valM;     // data loaded from memory
  } mW_t;

  localparam icode_reg_t ICODE_INIT = '{icode: I_NOP};
  localparam eM_t        EM_INIT    = '{icode: I_NOP, valE: '0, valA: '0};
  localparam mW_t        MW_INIT    = '{icode: I_NOP, valM: '0};

endpackage
