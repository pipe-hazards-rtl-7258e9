// execute_stage: ALU, condition codes and branch condition.
//
// The ALU computes valE = aluB OP aluA, where
//   aluA = valA (rrmovq/cmovXX, OPq), valC (irmovq, rmmovq, mrmovq),
//          -8 (call, pushq) or +8 (ret, popq);
//   aluB = valB for everything that adds to a register, 0 for rrmovq/irmovq;
//   OP   = ifun for OPq (add, sub, and, xor), add otherwise.
// OPq instructions load the condition codes ZF, SF and OF at the end of the
// cycle; the codes are the only state in this stage and reset to ZF=1,
// SF=0, OF=0. e_Cnd is the ifun condition evaluated on the current codes:
// it decides whether a jXX really is taken and whether a cmovXX writes its
// destination (e_dstE becomes 0xF when it does not).
//
// Timing: one cycle. e_valE and e_dstE are also the youngest forwarding
// source, and e_Cnd is what the hazard unit uses to detect a mispredicted
// jXX while the jXX is still in execute. Setting ZF in execute and using it
// in the execute stage of the following jXX follows the design; the
// operand selection and flag rules are those of Y86-64.
module execute_stage
  import y86_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  e_reg_t E,
  output word_t  e_valE,
  output reg_t   e_dstE,
  output logic   e_Cnd,
  output m_reg_t e_out,     // next contents of the M register
  output logic [2:0] cc     // {ZF, SF, OF}
);

  word_t  aluA, aluB, res;
  alufn_e fn;
  logic   zf, sf, of_;
  logic   n_zf, n_sf, n_of;
  logic   set_cc;

  always_comb begin
    case (E.icode)
      I_RRMOVQ, I_OPQ:             aluA = E.valA;
      I_IRMOVQ, I_RMMOVQ, I_MRMOVQ: aluA = E.valC;
      I_CALL, I_PUSHQ:             aluA = -64'sd8;
      I_RET, I_POPQ:               aluA = 64'd8;
      default:                     aluA = '0;
    endcase
    case (E.icode)
      I_RMMOVQ, I_MRMOVQ, I_OPQ, I_CALL, I_PUSHQ, I_RET, I_POPQ: aluB = E.valB;
      default:                                                   aluB = '0;
    endcase
    fn = (E.icode == I_OPQ) ? alufn_e'(E.ifun) : ALU_ADD;
  end

  always_comb begin
    case (fn)
      ALU_SUB: res = aluB - aluA;
      ALU_AND: res = aluB & aluA;
      ALU_XOR: res = aluB ^ aluA;
      default: res = aluB + aluA;
    endcase
    n_zf = (res == '0);
    n_sf = res[63];
    case (fn)
      ALU_ADD: n_of = (aluA[63] == aluB[63]) && (res[63] != aluA[63]);
      ALU_SUB: n_of = (aluA[63] != aluB[63]) && (res[63] != aluB[63]);
      default: n_of = 1'b0;
    endcase
  end

  assign set_cc = (E.icode == I_OPQ);

  always_ff @(posedge clk) begin
    if (rst) begin
      zf <= 1'b1; sf <= 1'b0; of_ <= 1'b0;
    end else if (set_cc) begin
      zf <= n_zf; sf <= n_sf; of_ <= n_of;
    end
  end

  assign cc     = {zf, sf, of_};
  assign e_valE = res;
  assign e_Cnd  = cond_holds(E.ifun, zf, sf, of_);
  assign e_dstE = (E.icode == I_RRMOVQ && !e_Cnd) ? REG_NONE : E.dstE;

  always_comb begin
    e_out.stat  = E.stat;
    e_out.icode = E.icode;
    e_out.Cnd   = e_Cnd;
    e_out.valE  = res;
    e_out.valA  = E.valA;
    e_out.dstE  = e_dstE;
    e_out.dstM  = E.dstM;
  end

endmodule
