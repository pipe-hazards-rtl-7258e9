// pipe_cpu: five-stage pipelined Y86-64 processor with hazard handling.
//
// Stages fetch, decode, execute, memory and writeback are separated by the
// pipeline registers F (predicted PC), D, E, M and W, each a pipe_reg that
// can load, stall (keep its value) or bubble (load a no-op). One instruction
// completes per cycle except around hazards:
//   - most data hazards are removed by forwarding into decode
//     (decode_stage);
//   - load/use costs one stall cycle;
//   - jXX is predicted taken; a misprediction found in execute squashes the
//     two younger instructions (2-cycle penalty);
//   - ret stalls fetch until its return address leaves memory (3 cycles).
// hazard_unit computes all stall and bubble signals.
//
// Interface: imem_* loads the program (one byte per clock, while or before
// running); dbg_reg/dbg_val read a register; halted rises when a halt (or
// an invalid instruction) reaches writeback, after which the pipeline is
// frozen. retire pulses for every instruction that leaves writeback.
// Reset (synchronous, active high) empties the pipeline and starts fetching
// at address 0. Instruction and data memories are separate.
module pipe_cpu
  import y86_pkg::*;
#(
  parameter int IMEM_BYTES = 1024,
  parameter int DMEM_BYTES = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        imem_we,
  input  logic [63:0] imem_waddr,
  input  logic [7:0]  imem_wdata,
  input  logic [3:0]  dbg_reg,
  output logic [63:0] dbg_val,
  output logic        halted,
  output logic [2:0]  status,    // stat_e of the instruction in writeback
  output logic        retire
);

  f_reg_t F, f_next;
  d_reg_t D, f_out;
  e_reg_t E, d_out;
  m_reg_t M, e_out;
  w_reg_t W, m_out;

  word_t  f_pc, f_predPC;
  logic [79:0] i10bytes;
  icode_e f_icode;

  reg_t   d_srcA, d_srcB;
  word_t  rf_valA, rf_valB;
  fwd_e   fwdA, fwdB;

  word_t  e_valE;
  reg_t   e_dstE;
  logic   e_Cnd;
  logic [2:0] cc;

  word_t  mem_addr, mem_wdata, mem_rdata, m_valM;
  logic   mem_write, mem_read;

  logic stall_F, stall_D, bubble_D, stall_E, bubble_E, stall_M, stall_W;
  logic need_ret_stall, need_ret_bubble, mispredict, load_use;

  // ---------------- fetch ----------------
  imem #(.BYTES(IMEM_BYTES)) u_imem (
    .clk(clk), .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata),
    .pc(f_pc), .i10bytes(i10bytes)
  );

  fetch_stage u_fetch (
    .F(F), .M_icode(M.icode), .M_Cnd(M.Cnd), .M_valA(M.valA),
    .W_icode(W.icode), .W_valM(W.valM),
    .f_pc(f_pc), .i10bytes(i10bytes), .f_out(f_out), .f_icode(f_icode),
    .f_predPC(f_predPC)
  );

  assign f_next.predPC = f_predPC;

  pipe_reg #(.T(f_reg_t), .DEFAULT(F_RESET)) u_F (
    .clk(clk), .rst(rst), .stall(stall_F), .bubble(1'b0), .d(f_next), .q(F));

  pipe_reg #(.T(d_reg_t), .DEFAULT(D_BUBBLE)) u_D (
    .clk(clk), .rst(rst), .stall(stall_D), .bubble(bubble_D), .d(f_out), .q(D));

  // ---------------- decode ----------------
  regfile #(.WIDTH(64)) u_rf (
    .clk(clk), .rst(rst),
    .srcA(d_srcA), .srcB(d_srcB), .valA(rf_valA), .valB(rf_valB),
    .dstE(W.dstE), .valE(W.valE), .dstM(W.dstM), .valM(W.valM),
    .init_we(1'b0), .init_addr(REG_NONE), .init_data('0),
    .dbg_addr(dbg_reg), .dbg_data(dbg_val)
  );

  decode_stage u_decode (
    .D(D), .d_srcA(d_srcA), .d_srcB(d_srcB), .rf_valA(rf_valA), .rf_valB(rf_valB),
    .e_dstE(e_dstE), .e_valE(e_valE),
    .M_dstM(M.dstM), .m_valM(m_valM),
    .M_dstE(M.dstE), .M_valE(M.valE),
    .W_dstM(W.dstM), .W_valM(W.valM),
    .W_dstE(W.dstE), .W_valE(W.valE),
    .d_out(d_out), .fwdA(fwdA), .fwdB(fwdB)
  );

  pipe_reg #(.T(e_reg_t), .DEFAULT(E_BUBBLE)) u_E (
    .clk(clk), .rst(rst), .stall(stall_E), .bubble(bubble_E), .d(d_out), .q(E));

  // ---------------- execute ----------------
  execute_stage u_execute (
    .clk(clk), .rst(rst), .E(E), .e_valE(e_valE), .e_dstE(e_dstE), .e_Cnd(e_Cnd),
    .e_out(e_out), .cc(cc)
  );

  pipe_reg #(.T(m_reg_t), .DEFAULT(M_BUBBLE)) u_M (
    .clk(clk), .rst(rst), .stall(stall_M), .bubble(1'b0), .d(e_out), .q(M));

  // ---------------- memory ----------------
  dmem #(.BYTES(DMEM_BYTES)) u_dmem (
    .clk(clk), .addr(mem_addr), .we(mem_write && !halted), .wdata(mem_wdata),
    .rdata(mem_rdata)
  );

  memory_stage u_memory (
    .M(M), .mem_addr(mem_addr), .mem_write(mem_write), .mem_wdata(mem_wdata),
    .mem_read(mem_read), .mem_rdata(mem_rdata), .m_valM(m_valM), .m_out(m_out)
  );

  pipe_reg #(.T(w_reg_t), .DEFAULT(W_BUBBLE)) u_W (
    .clk(clk), .rst(rst), .stall(stall_W), .bubble(1'b0), .d(m_out), .q(W));

  // ---------------- hazard control ----------------
  hazard_unit u_hazard (
    .f_icode(f_icode), .D_icode(D.icode), .E_icode(E.icode), .M_icode(M.icode),
    .E_dstM(E.dstM), .d_srcA(d_srcA), .d_srcB(d_srcB), .e_Cnd(e_Cnd),
    .W_stat(W.stat),
    .stall_F(stall_F), .stall_D(stall_D), .bubble_D(bubble_D),
    .stall_E(stall_E), .bubble_E(bubble_E), .stall_M(stall_M), .stall_W(stall_W),
    .halted(halted), .need_ret_stall(need_ret_stall), .need_ret_bubble(need_ret_bubble),
    .mispredict(mispredict), .load_use(load_use)
  );

  // A halt stays in W once it arrives; count it as retired only once.
  logic halted_q;
  always_ff @(posedge clk) begin
    if (rst) halted_q <= 1'b0;
    else     halted_q <= halted;
  end

  assign status = W.stat;
  assign retire = (W.stat != S_BUB) && !halted_q;

endmodule
