// pipe_hazards_top: the two pipelines of this design, side by side.
//
// cpu_*  : pipe_cpu, the five-stage Y86-64 processor with forwarding,
//          jXX prediction and squashing, and ret and load/use stalls.
// addq_* : addq_pipe, the addq-only pipeline that introduces forwarding.
// The two share only clock and reset; each brings out its own program-load
// port, register debug port and status. Parameters are passed through with
// the same defaults as the submodules.
module pipe_hazards_top #(
  parameter int IMEM_BYTES = 1024,
  parameter int DMEM_BYTES = 1024
) (
  input  logic        clk,
  input  logic        rst,
  // five-stage processor
  input  logic        cpu_imem_we,
  input  logic [63:0] cpu_imem_waddr,
  input  logic [7:0]  cpu_imem_wdata,
  input  logic [3:0]  cpu_dbg_reg,
  output logic [63:0] cpu_dbg_val,
  output logic        cpu_halted,
  output logic [2:0]  cpu_status,
  output logic        cpu_retire,
  // addq-only pipeline
  input  logic        addq_imem_we,
  input  logic [63:0] addq_imem_waddr,
  input  logic [7:0]  addq_imem_wdata,
  input  logic        addq_reg_init_we,
  input  logic [3:0]  addq_reg_init_addr,
  input  logic [63:0] addq_reg_init_data,
  input  logic [3:0]  addq_dbg_reg,
  output logic [63:0] addq_dbg_val,
  output logic [1:0]  addq_fwd
);

  pipe_cpu #(.IMEM_BYTES(IMEM_BYTES), .DMEM_BYTES(DMEM_BYTES)) u_cpu (
    .clk(clk), .rst(rst),
    .imem_we(cpu_imem_we), .imem_waddr(cpu_imem_waddr), .imem_wdata(cpu_imem_wdata),
    .dbg_reg(cpu_dbg_reg), .dbg_val(cpu_dbg_val),
    .halted(cpu_halted), .status(cpu_status), .retire(cpu_retire)
  );

  addq_pipe #(.IMEM_BYTES(IMEM_BYTES)) u_addq (
    .clk(clk), .rst(rst),
    .imem_we(addq_imem_we), .imem_waddr(addq_imem_waddr), .imem_wdata(addq_imem_wdata),
    .reg_init_we(addq_reg_init_we), .reg_init_addr(addq_reg_init_addr),
    .reg_init_data(addq_reg_init_data),
    .dbg_reg(addq_dbg_reg), .dbg_val(addq_dbg_val), .fwd_count(addq_fwd)
  );

endmodule
