// imem: byte-addressed instruction memory that returns ten bytes per fetch.
//
// The fetch stage needs up to ten instruction bytes at once (the longest
// Y86-64 instruction), so the read port returns i10bytes, the bytes at
// pc .. pc+9 packed little-endian (byte pc in bits 7:0, which places icode
// in bits 7:4, rA in bits 15:12 and rB in bits 11:8). The read is
// combinational. Addresses wrap modulo BYTES.
//
// A byte-wide write port (we/waddr/wdata, written on the rising clock edge)
// loads the program. The contents are not reset. The memory size is this
// implementation's choice.
module imem #(
  parameter int BYTES = 1024,
  parameter int AW    = $clog2(BYTES)
) (
  input  logic        clk,
  input  logic        we,
  input  logic [63:0] waddr,
  input  logic [7:0]  wdata,
  input  logic [63:0] pc,
  output logic [79:0] i10bytes
);

  logic [7:0] mem [BYTES];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[AW-1:0]] <= wdata;
  end

  always_comb begin
    for (int k = 0; k < 10; k++)
      i10bytes[8*k +: 8] = mem[AW'(pc[AW-1:0] + AW'(k))];
  end

endmodule
