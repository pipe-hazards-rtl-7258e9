// tb_pipe_hazards_top: end-to-end test of the whole design at its default
// sizes.
//
// The five-stage processor runs one program that contains every hazard
// the design handles: a call/ret pair (ret stall), a not-taken jne after a
// subq that sets ZF (misprediction squash), a load followed at once by its
// use (load/use stall), back-to-back dependent ALU instructions and a
// dependent store (forwarding from each pipeline stage), and a counted loop
// whose backward jne is predicted correctly. Final registers and the cycle
// count are compared with the instruction-level reference model. At the
// same time the addq pipeline runs the forwarding example followed by a
// chain of dependent addq instructions. Each mechanism is counted and
// must occur at least once.
`timescale 1ns/1ps
module tb_pipe_hazards_top;
  import y86_pkg::*;
  import y86_tb_pkg::*;

  localparam int DMEM = 1024;

  logic clk = 0, rst = 1;
  logic cpu_imem_we = 0, addq_imem_we = 0, addq_reg_init_we = 0;
  logic [63:0] cpu_imem_waddr = 0, addq_imem_waddr = 0, addq_reg_init_data = 0;
  logic [7:0] cpu_imem_wdata = 0, addq_imem_wdata = 0;
  logic [3:0] cpu_dbg_reg = 0, addq_dbg_reg = 0, addq_reg_init_addr = 0;
  logic [63:0] cpu_dbg_val, addq_dbg_val;
  logic cpu_halted, cpu_retire;
  logic [2:0] cpu_status;
  logic [1:0] addq_fwd;

  int checks = 0, failures = 0;
  int ev_loaduse = 0, ev_mispred = 0, ev_retstall = 0, ev_addq_fwd = 0;
  int ev_fwd [7];
  logic [7:0] aprog [1024];

  pipe_hazards_top dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (!rst) begin
    if (!cpu_halted) begin
      if (dut.u_cpu.load_use)   ev_loaduse++;
      if (dut.u_cpu.mispredict) ev_mispred++;
      if (dut.u_cpu.need_ret_stall && dut.u_cpu.stall_F) ev_retstall++;
      if (dut.u_cpu.D.stat != S_BUB) begin
        ev_fwd[int'(dut.u_cpu.fwdA)]++;
        ev_fwd[int'(dut.u_cpu.fwdB)]++;
      end
    end
    ev_addq_fwd += int'(addq_fwd[0]) + int'(addq_fwd[1]);
  end

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam logic [3:0] RAX=0, RCX=1, RBX=3, RSP=4, R8=8, R9=9, R10=10, R11=11,
                         R12=12, R13=13, R14=14;

  initial begin
    int at, loop, first, last, nret, span;
    bit done;
    foreach (ev_fwd[i]) ev_fwd[i] = 0;

    // ---------- five-stage processor program ----------
    prog_clear();
    for (int r = 0; r < 15; r++) emit_irmovq(100*r, 4'(r));
    emit_irmovq(64'h200, RSP);
    emit_irmovq(64'h100, RAX);
    emit_opq(4'h0, R8, R9);            // addq %r8,%r9
    emit_opq(4'h1, R9, R11);           // subq %r9,%r11   (forward e_valE)
    emit_mrmovq(4, RAX, R10);          // mrmovq 4(%rax),%r10
    emit_rmmovq(R9, 8, RAX);           // rmmovq %r9,8(%rax)
    emit_opq(4'h3, R10, R9);           // xorq %r10,%r9   (forward W_valM)
    emit_rmmovq(R9, 0, RAX);
    emit_mrmovq(0, RAX, RBX);          // load ...
    emit_opq(4'h1, RBX, RCX);          // ... and use: one stall
    emit_call(64'h180);                // call / ret
    emit_opq(4'h1, R8, R8);            // subq %r8,%r8 sets ZF
    at = plen + 1;
    emit_jxx(4'h4, 0);                 // jne (not taken): squash
    emit_opq(4'h3, R10, R11);          // xorq %r10,%r11
    emit_irmovq(4, R14); emit_irmovq(1, R13);
    loop = plen;
    emit_opq(4'h0, R13, R12); emit_opq(4'h1, R13, R14); emit_jxx(4'h4, 64'(loop));
    emit_pushq(R12); emit_popq(R8); emit_nop(); emit_nop();
    emit_opq(4'h0, R8, R8);            // popped value two instructions later (W_valM)
    emit_halt();
    for (int b = 0; b < 8; b++) prog[at + b] = 8'(64'h1C0 >> (8*b));
    plen = 'h180;                      // subroutine
    emit_opq(4'h0, R12, R13); emit_ret();
    plen = 'h1C0;                      // wrong-path target of the jne
    emit_opq(4'h0, R8, R9); emit_rmmovq(R10, 0, R11); emit_halt();

    // ---------- addq pipeline program ----------
    for (int a = 0; a < 1024; a += 2) begin aprog[a] = 8'h60; aprog[a + 1] = 8'hFF; end
    aprog[1] = 8'h89; aprog[3] = 8'h98; aprog[5] = 8'hA9;   // the forwarding example
    aprog[7] = 8'h98; aprog[9] = 8'h89; aprog[11] = 8'h88;  // more dependent addq

    // load both while reset holds the pipelines
    rst = 1;
    @(negedge clk);
    for (int a = 0; a < 1024; a++) begin
      cpu_imem_we = 1; cpu_imem_waddr = 64'(a); cpu_imem_wdata = prog[a];
      addq_imem_we = 1; addq_imem_waddr = 64'(a); addq_imem_wdata = aprog[a];
      addq_reg_init_we = (a < 15); addq_reg_init_addr = 4'(a); addq_reg_init_data = 64'(100 * a);
      @(negedge clk);
    end
    cpu_imem_we = 0; addq_imem_we = 0; addq_reg_init_we = 0;
    ref_mem.delete();
    for (int a = 0; a < DMEM; a++) ref_mem[a] = dut.u_cpu.u_dmem.mem[a];
    done = ref_run(10000, DMEM);
    check(done, "reference model halted");
    rst = 0;
    first = -1; last = -1; nret = 0;
    for (int c = 0; c < 2000 && !cpu_halted; c++) begin
      @(posedge clk); #1;
      if (cpu_retire) begin
        nret++;
        if (first < 0) first = c;
        last = c;
      end
    end
    span = last - first + 1;
    check(cpu_halted && cpu_status == S_HLT, "processor halted");
    check(nret == n_instr, $sformatf("retired %0d, expected %0d", nret, n_instr));
    check(span == n_instr + 3*n_ret + 2*n_mispred + n_loaduse,
          $sformatf("%0d cycles, expected %0d", span, n_instr + 3*n_ret + 2*n_mispred + n_loaduse));
    check(n_ret == 1 && n_mispred == 2 && n_loaduse >= 1, "program has the intended hazards");
    for (int r = 0; r < 15; r++) begin
      cpu_dbg_reg = 4'(r); #1;
      check(cpu_dbg_val == ref_reg[r], $sformatf("cpu R%0d = %h, expected %h", r, cpu_dbg_val, ref_reg[r]));
    end

    // addq pipeline: its six instructions have long completed
    begin
      longint unsigned m [15];
      for (int r = 0; r < 15; r++) m[r] = 100 * r;
      for (int k = 0; k < 6; k++) m[aprog[2*k+1][3:0]] += m[aprog[2*k+1][7:4]];
      for (int r = 0; r < 15; r++) begin
        addq_dbg_reg = 4'(r); #1;
        check(addq_dbg_val == m[r], $sformatf("addq R%0d = %0d, expected %0d", r, addq_dbg_val, m[r]));
      end
      addq_dbg_reg = 9; #1;
      check(addq_dbg_val == 64'd7900, "addq R9 after the chain");
    end

    check(ev_loaduse > 0, "load/use stall happened");
    check(ev_mispred > 0, "misprediction squash happened");
    check(ev_retstall > 0, "ret stall happened");
    for (int i = 1; i < 7; i++)
      check(ev_fwd[i] > 0, $sformatf("forwarding from %s happened", fwd_e'(i)));
    check(ev_addq_fwd > 0, "addq pipeline forwarding happened");
    $display("events: loaduse=%0d mispredict=%0d ret_stall_cycles=%0d addq_fwd=%0d fwd valP=%0d eE=%0d mM=%0d mE=%0d wM=%0d wE=%0d",
             ev_loaduse, ev_mispred, ev_retstall, ev_addq_fwd,
             ev_fwd[1], ev_fwd[2], ev_fwd[3], ev_fwd[4], ev_fwd[5], ev_fwd[6]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
