// memory_stage: data-memory control for the instruction in the M register.
//
// Combinational. Address: M_valE (the computed address or new stack
// pointer) for rmmovq, pushq, call and mrmovq; M_valA (the old stack
// pointer) for popq and ret. Writes: rmmovq, pushq and call store M_valA
// (the register value or the return address). Reads: mrmovq, popq and ret
// load m_valM, which is forwarded to decode in the same cycle and written
// to the W register. A ret therefore has its return address only at the
// end of this stage, which is why fetch must wait for it.
//
// Which instruction stores and which loads (call stores, ret loads) follows
// the design; the address selection is the Y86-64 rule.
module memory_stage
  import y86_pkg::*;
(
  input  m_reg_t M,
  output word_t  mem_addr,
  output logic   mem_write,
  output word_t  mem_wdata,
  output logic   mem_read,
  input  word_t  mem_rdata,
  output word_t  m_valM,
  output w_reg_t m_out     // next contents of the W register
);

  always_comb begin
    case (M.icode)
      I_RMMOVQ, I_PUSHQ, I_CALL, I_MRMOVQ: mem_addr = M.valE;
      I_POPQ, I_RET:                       mem_addr = M.valA;
      default:                             mem_addr = M.valE;
    endcase
  end

  assign mem_read  = M.icode inside {I_MRMOVQ, I_POPQ, I_RET};
  assign mem_write = M.icode inside {I_RMMOVQ, I_PUSHQ, I_CALL};
  assign mem_wdata = M.valA;
  assign m_valM    = mem_read ? mem_rdata : '0;

  always_comb begin
    m_out.stat  = M.stat;
    m_out.icode = M.icode;
    m_out.valE  = M.valE;
    m_out.valM  = m_valM;
    m_out.dstE  = M.dstE;
    m_out.dstM  = M.dstM;
  end

endmodule
