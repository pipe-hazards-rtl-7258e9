// dmem: byte-addressed data memory with 64-bit little-endian accesses.
//
// The memory stage reads and writes eight-byte words at any byte address.
// Reads are combinational (rdata = bytes addr .. addr+7, little-endian);
// a write with we=1 stores wdata on the rising clock edge. Addresses wrap
// modulo BYTES. The contents are not reset. The size, the combinational
// read and the write timing are choices of this implementation.
module dmem #(
  parameter int BYTES = 1024,
  parameter int AW    = $clog2(BYTES)
) (
  input  logic        clk,
  input  logic [63:0] addr,
  input  logic        we,
  input  logic [63:0] wdata,
  output logic [63:0] rdata
);

  logic [7:0] mem [BYTES];

  always_ff @(posedge clk) begin
    if (we)
      for (int k = 0; k < 8; k++)
        mem[AW'(addr[AW-1:0] + AW'(k))] <= wdata[8*k +: 8];
  end

  always_comb begin
    for (int k = 0; k < 8; k++)
      rdata[8*k +: 8] = mem[AW'(addr[AW-1:0] + AW'(k))];
  end

endmodule
