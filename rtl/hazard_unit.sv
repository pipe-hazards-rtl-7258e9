// hazard_unit: stall and bubble control of the five pipeline registers.
//
// Combinational. It resolves the three hazards that forwarding cannot:
//
// ret (3 cycles): the return address is known only when ret leaves memory.
//   need_ret_stall = icode_from_imem == RET || D_icode == RET || E_icode == RET
//   holds the PC register; need_ret_bubble = D, E or M holds a ret feeds
//   bubbles into D. The ret reaches writeback after three bubbles and fetch
//   takes its return address from there.
// jXX misprediction (2 cycles): jumps are predicted taken. When a jXX in
//   execute turns out not taken (E_icode == JXX && !e_Cnd) the two wrongly
//   fetched instructions, about to enter D and E, are squashed by bubbling
//   D and E; the next fetch uses the fall-through address.
// load/use (1 cycle): mrmovq or popq in execute whose dstM is a source of
//   the instruction in decode. D and F stall one cycle and E gets a bubble,
//   after which m_valM can be forwarded.
//
// The ret and mispredict equations are the design's own; the load/use rule
// implements its "mrmovq or popq + use in the immediately following
// instruction". When load/use and a ret in decode coincide, the stall of D
// takes priority over the ret bubble (otherwise the ret would be lost).
// When the instruction in writeback has status HLT or INS the processor
// stops: every register stalls and halted is raised.
module hazard_unit
  import y86_pkg::*;
(
  input  icode_e f_icode,      // icode_from_imem
  input  icode_e D_icode,
  input  icode_e E_icode,
  input  icode_e M_icode,
  input  reg_t   E_dstM,
  input  reg_t   d_srcA,
  input  reg_t   d_srcB,
  input  logic   e_Cnd,
  input  stat_e  W_stat,
  output logic   stall_F,
  output logic   stall_D,
  output logic   bubble_D,
  output logic   stall_E,
  output logic   bubble_E,
  output logic   stall_M,
  output logic   stall_W,
  output logic   halted,
  output logic   need_ret_stall,
  output logic   need_ret_bubble,
  output logic   mispredict,
  output logic   load_use
);

  assign halted = (W_stat == S_HLT) || (W_stat == S_INS);

  assign need_ret_stall  = (f_icode == I_RET) || (D_icode == I_RET) || (E_icode == I_RET);
  assign need_ret_bubble = (D_icode == I_RET) || (E_icode == I_RET) || (M_icode == I_RET);
  assign mispredict      = (E_icode == I_JXX) && !e_Cnd;
  assign load_use        = (E_icode inside {I_MRMOVQ, I_POPQ}) && (E_dstM != REG_NONE) &&
                           ((E_dstM == d_srcA) || (E_dstM == d_srcB));

  assign stall_F  = halted || need_ret_stall || load_use;
  assign stall_D  = halted || load_use;
  assign bubble_D = !stall_D && (mispredict || need_ret_bubble);
  assign stall_E  = halted;
  assign bubble_E = !halted && (mispredict || load_use);
  assign stall_M  = halted;
  assign stall_W  = halted;

endmodule
