// tb_hazard_unit: stall/bubble decisions for the hazard cases.
//
// ret: the call/ret/addq sequence, cycle by cycle: while the ret is
//   fetched or sits in decode or execute the PC stalls, and while it sits
//   in decode, execute or memory a bubble enters decode (three bubbles).
// jXX not taken in execute: decode and execute get bubbles, fetch goes on.
// load/use: mrmovq/popq in execute feeding the decode instruction stalls
//   fetch and decode and bubbles execute; no stall without a match.
// load/use together with a ret in decode: decode stalls, no bubble.
// halt in writeback: everything stalls.
// Random inputs then check that no register is told to stall and bubble
// at once.
`timescale 1ns/1ps
module tb_hazard_unit;
  import y86_pkg::*;
  icode_e f_icode, D_icode, E_icode, M_icode;
  reg_t E_dstM, d_srcA, d_srcB;
  logic e_Cnd;
  stat_e W_stat;
  logic stall_F, stall_D, bubble_D, stall_E, bubble_E, stall_M, stall_W, halted;
  logic need_ret_stall, need_ret_bubble, mispredict, load_use;
  int checks = 0, failures = 0;

  hazard_unit dut (.*);

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

  task automatic set(icode_e f, icode_e d, icode_e e, icode_e m);
    f_icode = f; D_icode = d; E_icode = e; M_icode = m;
    E_dstM = REG_NONE; d_srcA = REG_NONE; d_srcB = REG_NONE; e_Cnd = 1; W_stat = S_AOK;
  endtask

  task automatic expect_ctl(string t, bit sF, bit sD, bit bD, bit bE);
    #1;
    check(stall_F == sF, {t, ": stall_F"});
    check(stall_D == sD, {t, ": stall_D"});
    check(bubble_D == bD, {t, ": bubble_D"});
    check(bubble_E == bE, {t, ": bubble_E"});
    check(!stall_E && !stall_M && !stall_W && !halted, {t, ": no halt stall"});
  endtask

  initial begin
    // ret sequence (fetch, decode, execute, memory) at times 0..5
    set(I_CALL, I_NOP, I_NOP, I_NOP); expect_ctl("ret t0", 0, 0, 0, 0);
    set(I_RET,  I_CALL, I_NOP, I_NOP); expect_ctl("ret t1", 1, 0, 0, 0);
    set(I_RET,  I_RET, I_CALL, I_NOP); expect_ctl("ret t2", 1, 0, 1, 0);
    set(I_RET,  I_NOP, I_RET, I_CALL); expect_ctl("ret t3", 1, 0, 1, 0);
    set(I_RET,  I_NOP, I_NOP, I_RET);  expect_ctl("ret t4", 1, 0, 1, 0);
    set(I_OPQ,  I_NOP, I_NOP, I_NOP);  expect_ctl("ret t5", 0, 0, 0, 0);
    // misprediction
    set(I_RMMOVQ, I_OPQ, I_JXX, I_OPQ); e_Cnd = 0; expect_ctl("jne not taken", 0, 0, 1, 1);
    set(I_RMMOVQ, I_OPQ, I_JXX, I_OPQ); e_Cnd = 1; expect_ctl("jne taken", 0, 0, 0, 0);
    // load/use
    set(I_OPQ, I_OPQ, I_MRMOVQ, I_NOP); E_dstM = 4'd3; d_srcA = 4'd3; d_srcB = 4'd1;
    expect_ctl("load/use srcA", 1, 1, 0, 1);
    set(I_OPQ, I_OPQ, I_POPQ, I_NOP); E_dstM = 4'd3; d_srcA = 4'd2; d_srcB = 4'd3;
    expect_ctl("load/use srcB", 1, 1, 0, 1);
    set(I_OPQ, I_OPQ, I_MRMOVQ, I_NOP); E_dstM = 4'd3; d_srcA = 4'd2; d_srcB = 4'd1;
    expect_ctl("load, no use", 0, 0, 0, 0);
    set(I_OPQ, I_OPQ, I_OPQ, I_NOP); E_dstM = 4'd3; d_srcA = 4'd3;
    expect_ctl("not a load", 0, 0, 0, 0);
    set(I_OPQ, I_RET, I_MRMOVQ, I_NOP); E_dstM = REG_RSP; d_srcA = REG_RSP; d_srcB = REG_RSP;
    expect_ctl("load/use with ret in decode", 1, 1, 0, 1);
    // halt
    set(I_HALT, I_HALT, I_HALT, I_HALT); W_stat = S_HLT; #1;
    check(halted && stall_F && stall_D && stall_E && stall_M && stall_W && !bubble_D && !bubble_E,
          "halt in writeback freezes the pipeline");
    // random: never stall and bubble the same register
    for (int i = 0; i < 3000; i++) begin
      f_icode = icode_e'($urandom_range(0, 11)); D_icode = icode_e'($urandom_range(0, 11));
      E_icode = icode_e'($urandom_range(0, 11)); M_icode = icode_e'($urandom_range(0, 11));
      E_dstM = 4'($urandom_range(0, 4)); d_srcA = 4'($urandom_range(0, 4)); d_srcB = 4'($urandom_range(0, 4));
      e_Cnd = 1'($urandom); W_stat = stat_e'($urandom_range(0, 3));
      #1;
      check(!(stall_D && bubble_D) && !(stall_E && bubble_E), $sformatf("random %0d: stall and bubble", i));
      check(mispredict == (E_icode == I_JXX && !e_Cnd), $sformatf("random %0d: mispredict", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
