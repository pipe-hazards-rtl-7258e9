// tb_dmem: random 64-bit writes and reads at arbitrary byte addresses
// against a byte-array model (little-endian, addresses wrap).
`timescale 1ns/1ps
module tb_dmem;
  localparam int BYTES = 128;
  logic clk = 0, we = 0;
  logic [63:0] addr = 0, wdata = 0, rdata;
  logic [7:0] model [BYTES];
  int checks = 0, failures = 0;

  dmem #(.BYTES(BYTES)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    // fill every byte first so the model is known
    for (int a = 0; a < BYTES; a += 8) begin
      we = 1; addr = 64'(a); wdata = {$urandom, $urandom};
      for (int k = 0; k < 8; k++) model[a + k] = wdata[8*k +: 8];
      @(negedge clk);
    end
    for (int i = 0; i < 2000; i++) begin
      logic [63:0] exp;
      we = $urandom_range(0, 1); addr = {$urandom, $urandom}; wdata = {$urandom, $urandom};
      for (int k = 0; k < 8; k++) exp[8*k +: 8] = model[(addr[6:0] + k) % BYTES];
      #1;
      checks++;
      if (rdata !== exp) begin
        failures++;
        $display("FAIL: addr=%h got %h expected %h", addr, rdata, exp);
      end
      @(posedge clk);
      if (we) for (int k = 0; k < 8; k++) model[(addr[6:0] + k) % BYTES] = wdata[8*k +: 8];
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
