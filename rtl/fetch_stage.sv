// fetch_stage: PC selection, instruction split and next-PC prediction.
//
// Combinational. Each cycle it chooses the address to fetch from:
//   - a jXX found not taken in the previous cycle (now in memory, M_Cnd=0)
//     was predicted taken, so fetch resumes at its fall-through address,
//     which travels down the pipeline as M_valA;
//   - a ret that has reached writeback supplies its return address, W_valM;
//   - otherwise the predicted PC held in the F pipeline register.
// It splits the ten fetched bytes into icode, ifun, rA, rB and valC, works
// out valP (the address of the next instruction: PC + 1, + 1 if the
// instruction has a register byte, + 8 if it has a constant) and predicts
// the next PC: the target for jXX (always assumed taken) and call, valP
// otherwise. halt and invalid codes predict their own address, so fetch
// keeps returning them until the processor stops. Instructions without a
// register byte get rA = rB = 0xF.
//
// Branch prediction "assume taken", the M-stage redirect after a
// misprediction and the writeback-stage redirect after ret follow the
// design; the handling of halt and invalid codes is this implementation's.
module fetch_stage
  import y86_pkg::*;
(
  input  f_reg_t      F,
  input  icode_e      M_icode,
  input  logic        M_Cnd,
  input  word_t       M_valA,
  input  icode_e      W_icode,
  input  word_t       W_valM,
  output word_t       f_pc,       // to instruction memory
  input  logic [79:0] i10bytes,   // from instruction memory
  output d_reg_t      f_out,      // next contents of the D register
  output icode_e      f_icode,    // icode_from_imem, for the hazard unit
  output word_t       f_predPC    // next contents of the F register
);

  logic [3:0] raw_icode, raw_ifun;
  logic       instr_valid, need_regids, need_valC;
  icode_e     icode;

  always_comb begin
    if (M_icode == I_JXX && !M_Cnd) f_pc = M_valA;
    else if (W_icode == I_RET)      f_pc = W_valM;
    else                            f_pc = F.predPC;
  end

  assign raw_icode = i10bytes[7:4];
  assign raw_ifun  = i10bytes[3:0];

  always_comb begin
    instr_valid = 1'b1;
    case (raw_icode)
      I_HALT, I_NOP, I_IRMOVQ, I_RMMOVQ, I_MRMOVQ, I_CALL, I_RET, I_PUSHQ, I_POPQ:
        instr_valid = (raw_ifun == 4'h0);
      I_RRMOVQ, I_JXX: instr_valid = (raw_ifun <= 4'h6);
      I_OPQ:           instr_valid = (raw_ifun <= 4'h3);
      default:         instr_valid = 1'b0;
    endcase
  end

  // An invalid instruction travels as a nop carrying status INS.
  assign icode   = instr_valid ? icode_e'(raw_icode) : I_NOP;
  assign f_icode = icode;

  assign need_regids = icode inside {I_RRMOVQ, I_OPQ, I_PUSHQ, I_POPQ,
                                     I_IRMOVQ, I_RMMOVQ, I_MRMOVQ};
  assign need_valC   = icode inside {I_IRMOVQ, I_RMMOVQ, I_MRMOVQ, I_JXX, I_CALL};

  always_comb begin
    f_out.stat  = !instr_valid        ? S_INS :
                  (icode == I_HALT)   ? S_HLT : S_AOK;
    f_out.icode = icode;
    f_out.ifun  = instr_valid ? raw_ifun : 4'h0;
    f_out.rA    = need_regids ? i10bytes[15:12] : REG_NONE;
    f_out.rB    = need_regids ? i10bytes[11:8]  : REG_NONE;
    f_out.valC  = need_regids ? i10bytes[79:16] : i10bytes[71:8];
    f_out.valP  = f_pc + 64'd1 + {63'd0, need_regids} + (need_valC ? 64'd8 : 64'd0);
  end

  always_comb begin
    if (icode == I_JXX || icode == I_CALL)       f_predPC = f_out.valC;
    else if (icode == I_HALT || !instr_valid)    f_predPC = f_pc;
    else                                         f_predPC = f_out.valP;
  end

endmodule
