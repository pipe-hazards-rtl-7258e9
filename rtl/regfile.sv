// regfile: the Y86-64 register file, 15 registers of WIDTH bits.
//
// Two combinational read ports (srcA -> valA, srcB -> valB) and two write
// ports written on the rising clock edge: dstE <- valE (ALU results) and
// dstM <- valM (loaded values). Register number 0xF means "none": reading it
// returns 0 and writing it does nothing. When both write ports name the same
// register, the dstM write wins (popq %rsp keeps the loaded value).
// A write becomes visible to the read ports only after the clock edge, so a
// value being written back in the same cycle must be forwarded around the
// register file by the pipeline.
//
// A third, lowest-priority write port (init_*) lets a host preload
// registers, and dbg_addr/dbg_data is a read port for inspection. Reset
// clears all registers to 0. Port names, the two read and two write ports,
// and 0xF as "no register" follow the design; reset value, write priority
// and the host ports are choices of this implementation.
module regfile #(
  parameter int WIDTH = 64
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [3:0]       srcA,
  input  logic [3:0]       srcB,
  output logic [WIDTH-1:0] valA,
  output logic [WIDTH-1:0] valB,
  input  logic [3:0]       dstE,
  input  logic [WIDTH-1:0] valE,
  input  logic [3:0]       dstM,
  input  logic [WIDTH-1:0] valM,
  input  logic             init_we,
  input  logic [3:0]       init_addr,
  input  logic [WIDTH-1:0] init_data,
  input  logic [3:0]       dbg_addr,
  output logic [WIDTH-1:0] dbg_data
);

  localparam logic [3:0] NONE = 4'hF;

  logic [WIDTH-1:0] r [15];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 15; i++) r[i] <= '0;
    end else begin
      if (init_we && init_addr != NONE) r[init_addr] <= init_data;
      if (dstE != NONE) r[dstE] <= valE;
      if (dstM != NONE) r[dstM] <= valM;
    end
  end

  assign valA     = (srcA == NONE) ? '0 : r[srcA];
  assign valB     = (srcB == NONE) ? '0 : r[srcB];
  assign dbg_data = (dbg_addr == NONE) ? '0 : r[dbg_addr];

endmodule
