// addq_pipe: a minimal pipeline that executes only "addq rA, rB", with
// forwarding.
//
// Every instruction is two bytes (icode:ifun, rA:rB) and computes
// R[rB] <- R[rA] + R[rB]. Four registers cut the datapath into stages:
//   xF  pc                    fetch: pc + 2, split rA/rB from the bytes
//   fD  rA, rB                decode: read R[rA], R[rB]; dstE = rB
//   dE  valA, valB, dstE      execute: valE = valA + valB
//   eW  valE, dstE            writeback: R[dstE] <- valE
// The register-file write happens at the end of writeback, so an
// instruction reading a register that one of the two instructions ahead of
// it writes would see the old value. Two MUXes in front of dE fix that: a
// source equal to e_dstE takes e_valE (the result being computed in
// execute), else one equal to W_dstE takes W_valE (the result being written
// back), else the register-file output. The dstM port of the register file
// is tied to 0xF. With the registers preset to R[i] = 100*i,
// "addq %r8,%r9; addq %r9,%r8" leaves R9 = 1700 and R8 = 2500.
//
// Interface: imem_* loads instruction bytes, reg_init_* presets registers
// (at most one per clock; reset does not clear the register file, so preset
// them while reset is held), dbg_reg/dbg_val read a register. After reset the
// pipeline holds bubbles (rA = rB = dstE = 0xF) and fetches from address 0;
// it then runs one instruction per cycle without stalls. The stage split,
// register contents, bubble values and the forwarding conditions follow the
// design; forwarding from writeback is this implementation's reading of its
// three-instruction example.
module addq_pipe #(
  parameter int IMEM_BYTES = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        imem_we,
  input  logic [63:0] imem_waddr,
  input  logic [7:0]  imem_wdata,
  input  logic        reg_init_we,
  input  logic [3:0]  reg_init_addr,
  input  logic [63:0] reg_init_data,
  input  logic [3:0]  dbg_reg,
  output logic [63:0] dbg_val,
  output logic [1:0]  fwd_count     // {srcB forwarded, srcA forwarded} this cycle
);

  localparam logic [3:0] REG_NONE = 4'hF;

  typedef struct packed { logic [63:0] pc; } xf_t;
  typedef struct packed { logic [3:0] rA; logic [3:0] rB; } fd_t;
  typedef struct packed { logic [63:0] valA; logic [63:0] valB; logic [3:0] dstE; } de_t;
  typedef struct packed { logic [63:0] valE; logic [3:0] dstE; } ew_t;

  localparam xf_t XF_DEF = '{pc: 64'd0};
  localparam fd_t FD_DEF = '{rA: REG_NONE, rB: REG_NONE};
  localparam de_t DE_DEF = '{valA: 64'd0, valB: 64'd0, dstE: REG_NONE};
  localparam ew_t EW_DEF = '{valE: 64'd0, dstE: REG_NONE};

  xf_t F, x_F;
  fd_t D, f_D;
  de_t E, d_E;
  ew_t W, e_W;

  logic [79:0] i10bytes;
  logic [63:0] reg_outputA, reg_outputB;
  logic [63:0] e_valE;
  logic [3:0]  reg_srcA, reg_srcB;

  // fetch + PC update
  imem #(.BYTES(IMEM_BYTES)) u_imem (
    .clk(clk), .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata),
    .pc(F.pc), .i10bytes(i10bytes)
  );
  assign x_F.pc = F.pc + 64'd2;
  assign f_D.rA = i10bytes[15:12];
  assign f_D.rB = i10bytes[11:8];

  pipe_reg #(.T(xf_t), .DEFAULT(XF_DEF)) u_xF (
    .clk(clk), .rst(rst), .stall(1'b0), .bubble(1'b0), .d(x_F), .q(F));
  pipe_reg #(.T(fd_t), .DEFAULT(FD_DEF)) u_fD (
    .clk(clk), .rst(rst), .stall(1'b0), .bubble(1'b0), .d(f_D), .q(D));

  // decode, with forwarding
  assign reg_srcA = D.rA;
  assign reg_srcB = D.rB;

  // The register file is not cleared by reset, so that registers preset
  // while reset holds the pipeline keep their values when it starts.
  regfile #(.WIDTH(64)) u_rf (
    .clk(clk), .rst(1'b0),
    .srcA(reg_srcA), .srcB(reg_srcB), .valA(reg_outputA), .valB(reg_outputB),
    .dstE(W.dstE), .valE(W.valE), .dstM(REG_NONE), .valM('0),
    .init_we(reg_init_we), .init_addr(reg_init_addr), .init_data(reg_init_data),
    .dbg_addr(dbg_reg), .dbg_data(dbg_val)
  );

  always_comb begin
    if (reg_srcA != REG_NONE && reg_srcA == E.dstE)      d_E.valA = e_valE;
    else if (reg_srcA != REG_NONE && reg_srcA == W.dstE) d_E.valA = W.valE;
    else                                                 d_E.valA = reg_outputA;
    if (reg_srcB != REG_NONE && reg_srcB == E.dstE)      d_E.valB = e_valE;
    else if (reg_srcB != REG_NONE && reg_srcB == W.dstE) d_E.valB = W.valE;
    else                                                 d_E.valB = reg_outputB;
    d_E.dstE = D.rB;
  end

  assign fwd_count[0] = reg_srcA != REG_NONE && (reg_srcA == E.dstE || reg_srcA == W.dstE);
  assign fwd_count[1] = reg_srcB != REG_NONE && (reg_srcB == E.dstE || reg_srcB == W.dstE);

  pipe_reg #(.T(de_t), .DEFAULT(DE_DEF)) u_dE (
    .clk(clk), .rst(rst), .stall(1'b0), .bubble(1'b0), .d(d_E), .q(E));

  // execute
  assign e_valE   = E.valA + E.valB;
  assign e_W.valE = e_valE;
  assign e_W.dstE = E.dstE;

  pipe_reg #(.T(ew_t), .DEFAULT(EW_DEF)) u_eW (
    .clk(clk), .rst(rst), .stall(1'b0), .bubble(1'b0), .d(e_W), .q(W));

endmodule
