// tb_addq_pipe: the addq-only pipeline with forwarding.
//
// With R[i] preset to 100*i, "addq %r8,%r9; addq %r9,%r8; addq %r10,%r9"
// must leave R9 = 1700, then R8 = 2500, then R9 = 2700: the second
// instruction needs the first one's result while it is still in execute,
// the third needs it while it is in writeback. The register values are
// checked in the cycle each one is written (one instruction per cycle,
// instruction k written back at the end of cycle k+3 after reset). Then a
// long random addq program is compared with a register-array model.
`timescale 1ns/1ps
module tb_addq_pipe;
  logic clk = 0, rst = 1;
  logic imem_we = 0;
  logic [63:0] imem_waddr = 0;
  logic [7:0] imem_wdata = 0;
  logic reg_init_we = 0;
  logic [3:0] reg_init_addr = 0;
  logic [63:0] reg_init_data = 0;
  logic [3:0] dbg_reg = 0;
  logic [63:0] dbg_val;
  logic [1:0] fwd_count;
  int checks = 0, failures = 0, nfwd = 0;
  logic [7:0] prog [1024];
  longint unsigned model [15];

  addq_pipe dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (!rst) nfwd += int'(fwd_count[0]) + int'(fwd_count[1]);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Hold reset, load prog[] and preset R[i] = 100*i, then release reset.
  task automatic load_and_start();
    rst = 1;
    @(negedge clk);
    for (int a = 0; a < 1024; a++) begin
      imem_we = 1; imem_waddr = 64'(a); imem_wdata = prog[a];
      reg_init_we = (a < 15); reg_init_addr = 4'(a); reg_init_data = 64'(100 * a);
      @(negedge clk);
    end
    imem_we = 0; reg_init_we = 0;
    rst = 0;
  endtask

  function automatic longint unsigned reg_after(int n, logic [3:0] r);
    for (int i = 0; i < 15; i++) model[i] = 100 * i;
    for (int k = 0; k < n; k++) begin
      logic [3:0] ra, rb;
      ra = prog[2*k + 1][7:4]; rb = prog[2*k + 1][3:0];
      if (rb != 4'hF) model[rb] = ((ra == 4'hF) ? 0 : model[ra]) + model[rb];
    end
    return model[r];
  endfunction

  initial begin
    // directed example; the rest of memory holds addq with no registers
    for (int a = 0; a < 1024; a += 2) begin prog[a] = 8'h60; prog[a + 1] = 8'hFF; end
    prog[1] = 8'h89; prog[3] = 8'h98; prog[5] = 8'hA9;
    load_and_start();
    // cycle c (c = 0 right after reset) writes back instruction c-3
    for (int c = 0; c < 8; c++) begin
      @(posedge clk); #1;
      if (c == 3) begin dbg_reg = 9; #1; check(dbg_val == 1700, $sformatf("R9 after (1) = %0d, expected 1700", dbg_val)); end
      if (c == 4) begin dbg_reg = 8; #1; check(dbg_val == 2500, $sformatf("R8 after (2) = %0d, expected 2500", dbg_val)); end
      if (c == 5) begin dbg_reg = 9; #1; check(dbg_val == 2700, $sformatf("R9 after (3) = %0d, expected 2700", dbg_val)); end
      if (c == 2) begin dbg_reg = 9; #1; check(dbg_val == 900, "R9 not yet written after 3 cycles"); end
    end
    check(nfwd >= 2, "forwarding used in the directed example");

    // random programs
    for (int t = 0; t < 5; t++) begin
      int n;
      n = 500;
      for (int k = 0; k < 512; k++) begin
        prog[2*k] = 8'h60;
        prog[2*k + 1] = (k < n) ? {4'($urandom_range(0, 14)), 4'($urandom_range(0, 14))} : 8'hFF;
        if ($urandom_range(0, 3) == 0 && k < n) prog[2*k + 1][7:4] = prog[2*k - 1 + (k == 0)][3:0];
      end
      load_and_start();
      repeat (n + 3) @(posedge clk);
      #1;
      for (int r = 0; r < 15; r++) begin
        longint unsigned e;
        e = reg_after(n, 4'(r));
        dbg_reg = 4'(r); #1;
        check(dbg_val == e, $sformatf("random %0d: R%0d = %0d, expected %0d", t, r, dbg_val, e));
      end
    end
    check(nfwd > 100, "forwarding used in random programs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
