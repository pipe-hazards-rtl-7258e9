// y86_pkg: types and constants shared by the pipelined Y86-64 processor.
//
// Instruction codes, register numbers, status codes, ALU functions and
// branch conditions follow the Y86-64 instruction set, whose encoding the
// five-stage design assumes: byte 0 holds icode (high nibble) and ifun (low
// nibble), byte 1 holds rA (high nibble) and rB (low nibble), and constants
// are 8-byte little-endian words. Register number 0xF means "no register",
// which is also the value a bubbled pipeline register carries.
//
// The structs are the contents of the pipeline registers between the
// stages, and the *_BUBBLE constants are the no-op values that a "bubble"
// loads into them (and that reset loads). The F register holds the
// predicted PC and resets to 0.
package y86_pkg;

  typedef enum logic [3:0] {
    I_HALT   = 4'h0,
    I_NOP    = 4'h1,
    I_RRMOVQ = 4'h2,  // also cmovXX
    I_IRMOVQ = 4'h3,
    I_RMMOVQ = 4'h4,
    I_MRMOVQ = 4'h5,
    I_OPQ    = 4'h6,
    I_JXX    = 4'h7,
    I_CALL   = 4'h8,
    I_RET    = 4'h9,
    I_PUSHQ  = 4'hA,
    I_POPQ   = 4'hB
  } icode_e;

  typedef enum logic [3:0] {
    ALU_ADD = 4'h0,
    ALU_SUB = 4'h1,
    ALU_AND = 4'h2,
    ALU_XOR = 4'h3
  } alufn_e;

  typedef enum logic [3:0] {
    C_YES = 4'h0,
    C_LE  = 4'h1,
    C_L   = 4'h2,
    C_E   = 4'h3,
    C_NE  = 4'h4,
    C_GE  = 4'h5,
    C_G   = 4'h6
  } cond_e;

  // BUB marks a pipeline slot that holds no instruction.
  typedef enum logic [2:0] {
    S_BUB = 3'd0,
    S_AOK = 3'd1,
    S_HLT = 3'd2,
    S_INS = 3'd3
  } stat_e;

  typedef logic [3:0]  reg_t;
  typedef logic [63:0] word_t;

  localparam reg_t REG_NONE = 4'hF;
  localparam reg_t REG_RSP  = 4'h4;

  // Forwarding source chosen by a decode-stage operand MUX.
  typedef enum logic [2:0] {
    FWD_REG  = 3'd0,  // register-file output, nothing newer in flight
    FWD_VALP = 3'd1,  // valA = valP for call / jXX
    FWD_EVE  = 3'd2,  // e_valE, ALU result of the instruction in execute
    FWD_MVM  = 3'd3,  // m_valM, value being read in memory
    FWD_MVE  = 3'd4,  // M_valE, ALU result held in the memory register
    FWD_WVM  = 3'd5,  // W_valM, loaded value held in the writeback register
    FWD_WVE  = 3'd6   // W_valE, ALU result held in the writeback register
  } fwd_e;

  typedef struct packed {
    word_t predPC;
  } f_reg_t;

  typedef struct packed {
    stat_e  stat;
    icode_e icode;
    logic [3:0] ifun;
    reg_t   rA;
    reg_t   rB;
    word_t  valC;
    word_t  valP;
  } d_reg_t;

  typedef struct packed {
    stat_e  stat;
    icode_e icode;
    logic [3:0] ifun;
    word_t  valC;
    word_t  valA;
    word_t  valB;
    reg_t   dstE;
    reg_t   dstM;
    reg_t   srcA;
    reg_t   srcB;
  } e_reg_t;

  typedef struct packed {
    stat_e  stat;
    icode_e icode;
    logic   Cnd;
    word_t  valE;
    word_t  valA;
    reg_t   dstE;
    reg_t   dstM;
  } m_reg_t;

  typedef struct packed {
    stat_e  stat;
    icode_e icode;
    word_t  valE;
    word_t  valM;
    reg_t   dstE;
    reg_t   dstM;
  } w_reg_t;

  localparam f_reg_t F_RESET  = '{predPC: 64'd0};
  localparam d_reg_t D_BUBBLE = '{stat: S_BUB, icode: I_NOP, ifun: 4'h0,
                                  rA: REG_NONE, rB: REG_NONE,
                                  valC: 64'd0, valP: 64'd0};
  localparam e_reg_t E_BUBBLE = '{stat: S_BUB, icode: I_NOP, ifun: 4'h0,
                                  valC: 64'd0, valA: 64'd0, valB: 64'd0,
                                  dstE: REG_NONE, dstM: REG_NONE,
                                  srcA: REG_NONE, srcB: REG_NONE};
  localparam m_reg_t M_BUBBLE = '{stat: S_BUB, icode: I_NOP, Cnd: 1'b0,
                                  valE: 64'd0, valA: 64'd0,
                                  dstE: REG_NONE, dstM: REG_NONE};
  localparam w_reg_t W_BUBBLE = '{stat: S_BUB, icode: I_NOP,
                                  valE: 64'd0, valM: 64'd0,
                                  dstE: REG_NONE, dstM: REG_NONE};

  // Branch / conditional-move condition from the condition codes.
  function automatic logic cond_holds(logic [3:0] ifun, logic zf, logic sf, logic of_);
    case (ifun)
      C_YES:   return 1'b1;
      C_LE:    return (sf ^ of_) | zf;
      C_L:     return sf ^ of_;
      C_E:     return zf;
      C_NE:    return ~zf;
      C_GE:    return ~(sf ^ of_);
      C_G:     return ~(sf ^ of_) & ~zf;
      default: return 1'b0;
    endcase
  endfunction

endpackage
