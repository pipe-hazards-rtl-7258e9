// tb_regfile: random reads and writes of the register file against an
// array model: two write ports (dstM wins a collision), 0xF neither read
// nor written, writes visible only after the clock edge, preload port.
`timescale 1ns/1ps
module tb_regfile;
  logic clk = 0, rst = 1;
  logic [3:0] srcA, srcB, dstE, dstM, init_addr, dbg_addr;
  logic [63:0] valA, valB, valE, valM, init_data, dbg_data;
  logic init_we;
  logic [63:0] model [16];
  int checks = 0, failures = 0;

  regfile dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    srcA = 0; srcB = 0; dstE = 4'hF; dstM = 4'hF; init_we = 0; init_addr = 4'hF;
    valE = 0; valM = 0; init_data = 0; dbg_addr = 0;
    @(negedge clk); @(negedge clk); rst = 0;
    foreach (model[i]) model[i] = 0;
    for (int i = 0; i < 2000; i++) begin
      srcA = 4'($urandom); srcB = 4'($urandom); dbg_addr = 4'($urandom);
      dstE = 4'($urandom); dstM = ($urandom_range(0, 2) == 0) ? dstE : 4'($urandom);
      valE = {$urandom, $urandom}; valM = {$urandom, $urandom};
      init_we = ($urandom_range(0, 4) == 0); init_addr = 4'($urandom); init_data = {$urandom, $urandom};
      #1;
      check(valA == ((srcA == 4'hF) ? 64'd0 : model[srcA]), $sformatf("%0d: valA", i));
      check(valB == ((srcB == 4'hF) ? 64'd0 : model[srcB]), $sformatf("%0d: valB", i));
      check(dbg_data == ((dbg_addr == 4'hF) ? 64'd0 : model[dbg_addr]), $sformatf("%0d: dbg", i));
      @(posedge clk);
      if (init_we && init_addr != 4'hF) model[init_addr] = init_data;
      if (dstE != 4'hF) model[dstE] = valE;
      if (dstM != 4'hF) model[dstM] = valM;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
