// decode_stage: register selection and the forwarding MUXes.
//
// Combinational. From the instruction in the D register it picks the
// register-file read addresses srcA/srcB and the destinations dstE (ALU
// result) and dstM (loaded value):
//   srcA: rA for rrmovq/cmovXX, rmmovq, OPq, pushq; %rsp for popq, ret
//   srcB: rB for OPq, rmmovq, mrmovq; %rsp for pushq, popq, call, ret
//   dstE: rB for rrmovq/cmovXX, irmovq, OPq; %rsp for pushq, popq, call, ret
//   dstM: rA for mrmovq, popq
// Each operand then passes a MUX that replaces the register-file value by a
// newer one still travelling down the pipeline, checked from the youngest
// producer to the oldest: e_valE (execute), m_valM (memory read), M_valE,
// W_valM, W_valE, and finally the register file. For call and jXX, valA is
// valP instead (the return address, or the fall-through address used to
// recover from a mispredicted jXX). A source of 0xF never matches.
//
// Forwarding from the execute, memory and writeback stages through MUXes in
// front of the decode/execute register follows the design; the exact list
// and priority of the sources and the Y86-64 register rules are standard
// for this instruction set. fwdA/fwdB report which source each MUX chose.
module decode_stage
  import y86_pkg::*;
(
  input  d_reg_t D,
  output reg_t   d_srcA,          // to register file and hazard unit
  output reg_t   d_srcB,
  input  word_t  rf_valA,         // register-file outputs
  input  word_t  rf_valB,
  input  reg_t   e_dstE,  input word_t e_valE,
  input  reg_t   M_dstM,  input word_t m_valM,
  input  reg_t   M_dstE,  input word_t M_valE,
  input  reg_t   W_dstM,  input word_t W_valM,
  input  reg_t   W_dstE,  input word_t W_valE,
  output e_reg_t d_out,           // next contents of the E register
  output fwd_e   fwdA,
  output fwd_e   fwdB
);

  reg_t d_dstE, d_dstM;

  always_comb begin
    case (D.icode)
      I_RRMOVQ, I_RMMOVQ, I_OPQ, I_PUSHQ: d_srcA = D.rA;
      I_POPQ, I_RET:                      d_srcA = REG_RSP;
      default:                            d_srcA = REG_NONE;
    endcase
    case (D.icode)
      I_OPQ, I_RMMOVQ, I_MRMOVQ:          d_srcB = D.rB;
      I_PUSHQ, I_POPQ, I_CALL, I_RET:     d_srcB = REG_RSP;
      default:                            d_srcB = REG_NONE;
    endcase
    case (D.icode)
      I_RRMOVQ, I_IRMOVQ, I_OPQ:          d_dstE = D.rB;
      I_PUSHQ, I_POPQ, I_CALL, I_RET:     d_dstE = REG_RSP;
      default:                            d_dstE = REG_NONE;
    endcase
    case (D.icode)
      I_MRMOVQ, I_POPQ:                   d_dstM = D.rA;
      default:                            d_dstM = REG_NONE;
    endcase
  end

  function automatic fwd_e pick(reg_t src, reg_t eE, reg_t mM, reg_t mE,
                                reg_t wM, reg_t wE);
    if (src == REG_NONE) return FWD_REG;
    if (src == eE)       return FWD_EVE;
    if (src == mM)       return FWD_MVM;
    if (src == mE)       return FWD_MVE;
    if (src == wM)       return FWD_WVM;
    if (src == wE)       return FWD_WVE;
    return FWD_REG;
  endfunction

  function automatic word_t value_of(fwd_e sel, word_t rf, word_t valP,
                                     word_t eE, word_t mM, word_t mE,
                                     word_t wM, word_t wE);
    case (sel)
      FWD_VALP: return valP;
      FWD_EVE:  return eE;
      FWD_MVM:  return mM;
      FWD_MVE:  return mE;
      FWD_WVM:  return wM;
      FWD_WVE:  return wE;
      default:  return rf;
    endcase
  endfunction

  always_comb begin
    if (D.icode == I_CALL || D.icode == I_JXX) fwdA = FWD_VALP;
    else fwdA = pick(d_srcA, e_dstE, M_dstM, M_dstE, W_dstM, W_dstE);
    fwdB = pick(d_srcB, e_dstE, M_dstM, M_dstE, W_dstM, W_dstE);
  end

  always_comb begin
    d_out.stat  = D.stat;
    d_out.icode = D.icode;
    d_out.ifun  = D.ifun;
    d_out.valC  = D.valC;
    d_out.valA  = value_of(fwdA, rf_valA, D.valP, e_valE, m_valM, M_valE, W_valM, W_valE);
    d_out.valB  = value_of(fwdB, rf_valB, D.valP, e_valE, m_valM, M_valE, W_valM, W_valE);
    d_out.dstE  = d_dstE;
    d_out.dstM  = d_dstM;
    d_out.srcA  = d_srcA;
    d_out.srcB  = d_srcB;
  end

endmodule
