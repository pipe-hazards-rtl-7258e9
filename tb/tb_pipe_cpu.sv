// tb_pipe_cpu: self-checking test of the five-stage Y86-64 processor.
//
// Each test builds a program with y86_tb_pkg, loads it through the
// instruction-memory port, runs the processor until halt and compares
// (1) all 15 registers with the instruction-level reference model,
// (2) the number of retired instructions, and
// (3) the cycle count from the first to the last retirement with
//     n_instr + 3*rets + 2*mispredicted jXX + load/use pairs,
// i.e. one instruction per cycle apart from the hazard penalties.
// Directed programs are the hazard examples (ret after call, a not-taken
// jne with squashing, the forwarding-path sequence, load/use, the three
// stall/forwarding exercises, a counted loop); random programs mix all
// instruction types with forward branches and calls. Every hazard mechanism
// and every forwarding source must occur at least once.
`timescale 1ns/1ps
module tb_pipe_cpu;
  import y86_pkg::*;
  import y86_tb_pkg::*;

  localparam int DMEM = 1024;

  logic clk = 0, rst = 1;
  logic imem_we = 0;
  logic [63:0] imem_waddr = 0;
  logic [7:0]  imem_wdata = 0;
  logic [3:0]  dbg_reg = 0;
  logic [63:0] dbg_val;
  logic halted, retire;
  logic [2:0] status;

  int checks = 0, failures = 0;
  int cyc = 0;
  int ev_loaduse = 0, ev_mispred = 0, ev_retbub = 0;
  int ev_fwd [7];

  pipe_cpu dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (!rst && !halted) begin
    if (dut.load_use)   ev_loaduse++;
    if (dut.mispredict) ev_mispred++;
    if (dut.bubble_D && dut.need_ret_bubble && !dut.mispredict) ev_retbub++;
    if (dut.D.stat != S_BUB) begin
      ev_fwd[int'(dut.fwdA)]++;
      ev_fwd[int'(dut.fwdB)]++;
    end
  end

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_prog(string name, int max_cycles = 5000);
    int first, last, nret;
    bit done;
    rst = 1;
    @(negedge clk);
    for (int a = 0; a < PROG_MAX; a++) begin
      imem_we = 1; imem_waddr = 64'(a); imem_wdata = prog[a];
      @(negedge clk);
    end
    imem_we = 0;
    // the data memory is not reset: start the model from its contents
    ref_mem.delete();
    for (int a = 0; a < DMEM; a++) ref_mem[a] = dut.u_dmem.mem[a];
    done = ref_run(100000, DMEM);
    check(done, {name, ": reference model reached halt"});
    @(negedge clk);
    rst = 0;
    first = -1; last = -1; nret = 0;
    for (int c = 0; c < max_cycles && !halted; c++) begin
      @(posedge clk);
      #1;
      if (retire) begin
        nret++;
        if (first < 0) first = c;
        last = c;
      end
    end
    check(halted, {name, ": processor halted"});
    check(status == S_HLT, {name, ": status is HLT"});
    check(nret == n_instr, $sformatf("%s: retired %0d, expected %0d", name, nret, n_instr));
    check(last - first + 1 == n_instr + 3*n_ret + 2*n_mispred + n_loaduse,
          $sformatf("%s: %0d cycles, expected %0d (instr %0d ret %0d mispred %0d loaduse %0d)",
                    name, last - first + 1, n_instr + 3*n_ret + 2*n_mispred + n_loaduse,
                    n_instr, n_ret, n_mispred, n_loaduse));
    for (int r = 0; r < 15; r++) begin
      dbg_reg = 4'(r);
      #1;
      check(dbg_val == ref_reg[r], $sformatf("%s: R%0d = %h, expected %h", name, r, dbg_val, ref_reg[r]));
    end
  endtask

  // registers
  localparam logic [3:0] RAX=0, RCX=1, RDX=2, RBX=3, RSP=4, RBP=5, RSI=6, RDI=7,
                         R8=8, R9=9, R10=10, R11=11, R12=12, R13=13, R14=14;

  task automatic init_regs();
    // R[i] = 100*i, %rsp = 0x200, %rax = %r10 = 0x100 (data area)
    for (int r = 0; r < 15; r++) emit_irmovq(100*r, 4'(r));
    emit_irmovq(64'h200, RSP);
    emit_irmovq(64'h100, RAX);
  endtask

  function automatic logic [3:0] rnd_dst();
    logic [3:0] r;
    do r = 4'($urandom_range(0, 14)); while (r == RSP);
    return r;
  endfunction

  task automatic random_prog(int n);
    int patch [$];
    int sub_at = 768;
    prog_clear();
    init_regs();
    for (int i = 0; i < n; i++) begin
      int k = $urandom_range(0, 11);
      logic [3:0] s = 4'($urandom_range(0, 14));
      logic [3:0] d = rnd_dst();
      case (k)
        0, 1:  emit_opq(4'($urandom_range(0, 3)), s, d);
        2:     emit_rr(4'($urandom_range(0, 6)), s, d);
        3:     emit_irmovq({$urandom, $urandom}, d);
        4:     emit_rmmovq(s, 64'($urandom_range(0, 64)), RAX);
        5:     emit_mrmovq(64'($urandom_range(0, 64)), RAX, d);
        6:     begin emit_pushq(s); end
        7:     begin emit_popq(d); end
        8:     begin  // forward conditional jump over 0..2 instructions
          int at = plen + 1;
          emit_jxx(4'($urandom_range(0, 6)), 0);
          for (int j = 0; j < $urandom_range(0, 2); j++) emit_opq(4'($urandom_range(0, 3)), s, d);
          for (int b = 0; b < 8; b++) prog[at + b] = 8'(longint'(plen) >> (8*b));
        end
        9:     emit_call(64'(sub_at));
        10:    emit_nop();
        default: begin  // load followed at once by a use
          emit_mrmovq(64'($urandom_range(0, 64)), RAX, d);
          emit_opq(4'($urandom_range(0, 3)), d, rnd_dst());
        end
      endcase
    end
    emit_halt();
    // subroutine: two ALU operations and ret
    plen = sub_at;
    emit_opq(4'h0, R12, R13);
    emit_opq(4'h3, R13, R14);
    emit_ret();
  endtask

  initial begin
    foreach (ev_fwd[i]) ev_fwd[i] = 0;
    repeat (3) @(negedge clk);

    // ret stall: call, then ret, then the instruction after the call
    prog_clear(); init_regs();
    emit_call(64'h80); emit_opq(4'h0, R8, R9); emit_halt();
    plen = 64'h80; emit_ret();
    run_prog("call/ret");

    // jne predicted taken but not taken: squash two instructions
    prog_clear(); init_regs();
    begin
      int at;
      emit_opq(4'h1, R8, R8);            // subq %r8,%r8 sets ZF
      at = plen + 1; emit_jxx(4'h4, 0);  // jne LABEL (not taken)
      emit_opq(4'h3, R10, R11);          // xorq %r10,%r11
      emit_halt();
      for (int b = 0; b < 8; b++) prog[at + b] = 8'(64'h90 >> (8*b));
      plen = 64'h90;
      emit_opq(4'h0, R8, R9);            // LABEL: addq %r8,%r9
      emit_rmmovq(R10, 0, R11);          // rmmovq %r10,0(%r11)
      emit_halt();
    end
    run_prog("jne mispredict");

    // forwarding paths
    prog_clear(); init_regs();
    emit_opq(4'h0, R8, R9);              // addq %r8,%r9
    emit_opq(4'h1, R9, R11);             // subq %r9,%r11
    emit_mrmovq(4, R11, R10);            // mrmovq 4(%r11),%r10
    emit_rmmovq(R9, 8, R11);             // rmmovq %r9,8(%r11)
    emit_opq(4'h3, R10, R9);             // xorq %r10,%r9
    emit_halt();
    run_prog("forwarding paths");

    // multiple forwarding paths (1) and (2)
    prog_clear(); init_regs();
    emit_opq(4'h0, R10, R8); emit_opq(4'h0, R11, R8); emit_opq(4'h0, R12, R8);
    emit_opq(4'h0, R10, R8); emit_opq(4'h0, R11, R12); emit_opq(4'h0, R12, R8);
    emit_halt();
    run_prog("multiple forwarding");

    // load/use, forwarding after decode, and exercise (1)
    prog_clear(); init_regs();
    emit_rmmovq(R9, 0, RAX);
    emit_mrmovq(0, RAX, RBX); emit_opq(4'h1, RBX, RCX);          // load/use
    emit_mrmovq(0, R10, R8); emit_rmmovq(R8, 0, R10); emit_opq(4'h0, R12, R8);
    emit_mrmovq(0, RAX, RBX); emit_opq(4'h0, RAX, RCX);
    emit_opq(4'h1, RBX, RCX); emit_rmmovq(RCX, 0, RAX);
    emit_halt();
    run_prog("load/use");

    // exercise (2): load, call, use in the callee, store, ret
    prog_clear(); init_regs();
    emit_mrmovq(0, RAX, RBX); emit_call(64'h100); emit_halt();
    plen = 64'h100;
    emit_opq(4'h0, RBX, RCX); emit_rmmovq(RCX, 0, RCX); emit_ret();
    run_prog("exercise 2");

    // exercise (3): taken jne, then load/use chains
    prog_clear(); init_regs();
    emit_opq(4'h0, RAX, RAX);
    emit_jxx(4'h4, 64'(plen + 9));
    emit_mrmovq(0, RAX, RBX); emit_opq(4'h0, RBX, RCX); emit_mrmovq(0, RBX, RCX);
    emit_halt();
    run_prog("exercise 3");

    // push/pop and popq %rsp
    prog_clear(); init_regs();
    emit_pushq(R8); emit_pushq(R9); emit_popq(R10); emit_opq(4'h0, R10, R11);
    emit_popq(R12); emit_pushq(RSP); emit_popq(RSP); emit_opq(4'h0, RSP, R13);
    emit_halt();
    run_prog("push/pop");

    // counted loop: backward jne taken (predicted right) then falls through
    prog_clear(); init_regs();
    begin
      int loop;
      emit_irmovq(5, R14); emit_irmovq(1, R13);
      loop = plen;
      emit_opq(4'h0, R13, R12); emit_opq(4'h1, R13, R14); emit_jxx(4'h4, 64'(loop));
      emit_halt();
    end
    run_prog("loop");

    // random programs
    for (int t = 0; t < 30; t++) begin
      random_prog(60);
      run_prog($sformatf("random %0d", t));
    end

    check(ev_loaduse > 0, "load/use stall occurred");
    check(ev_mispred > 0, "misprediction squash occurred");
    check(ev_retbub > 0, "ret bubble occurred");
    for (int i = 1; i < 7; i++)
      check(ev_fwd[i] > 0, $sformatf("forwarding source %s used", fwd_e'(i)));
    $display("events: loaduse=%0d mispredict=%0d ret_bubbles=%0d fwd valP=%0d eE=%0d mM=%0d mE=%0d wM=%0d wE=%0d",
             ev_loaduse, ev_mispred, ev_retbub, ev_fwd[1], ev_fwd[2], ev_fwd[3], ev_fwd[4], ev_fwd[5], ev_fwd[6]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
