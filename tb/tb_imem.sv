// tb_imem: loads random bytes and checks that every ten-byte fetch
// returns them little-endian, including fetches that wrap past the end.
`timescale 1ns/1ps
module tb_imem;
  localparam int BYTES = 256;
  logic clk = 0, we = 0;
  logic [63:0] waddr = 0, pc = 0;
  logic [7:0] wdata = 0;
  logic [79:0] i10bytes;
  logic [7:0] model [BYTES];
  int checks = 0, failures = 0;

  imem #(.BYTES(BYTES)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int a = 0; a < BYTES; a++) begin
      model[a] = 8'($urandom);
      we = 1; waddr = 64'(a); wdata = model[a];
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < 1000; i++) begin
      logic [79:0] exp;
      pc = (i < BYTES) ? 64'(i) : {$urandom, $urandom};
      for (int k = 0; k < 10; k++) exp[8*k +: 8] = model[(pc[7:0] + k) % BYTES];
      #1;
      checks++;
      if (i10bytes !== exp) begin
        failures++;
        $display("FAIL: pc=%h got %h expected %h", pc, i10bytes, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
