// tb_fetch_stage: instruction split, valP, predicted PC and PC selection.
//
// Every Y86-64 instruction format is presented as ten bytes with random
// registers and constants; rA/rB, valC, valP (PC + 1, +1 with a register
// byte, +8 with a constant) and the predicted PC (jXX/call target, valP
// otherwise) are compared with values worked out here. PC selection is
// checked for the three cases: predicted PC, not-taken jXX in memory
// (fall-through M_valA), ret in writeback (W_valM).
`timescale 1ns/1ps
module tb_fetch_stage;
  import y86_pkg::*;
  f_reg_t F;
  icode_e M_icode = I_NOP, W_icode = I_NOP;
  logic M_Cnd = 1;
  word_t M_valA = 0, W_valM = 0, f_pc, f_predPC;
  logic [79:0] i10bytes;
  d_reg_t f_out;
  icode_e f_icode;
  int checks = 0, failures = 0;

  fetch_stage dut (.*);

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
    logic [3:0] codes [12] = '{0, 1, 2, 3, 4, 5, 6, 7, 8, 9, 10, 11};
    for (int i = 0; i < 600; i++) begin
      logic [3:0] ic, fn, ra, rb;
      logic [63:0] c, pc, valP, pred;
      bit regs, hasc;
      ic = codes[i % 12];
      fn = (ic == 2 || ic == 7) ? 4'($urandom_range(0, 6)) : (ic == 6) ? 4'($urandom_range(0, 3)) : 4'h0;
      ra = 4'($urandom); rb = 4'($urandom);
      c = {$urandom, $urandom}; pc = {$urandom, $urandom};
      regs = ic inside {2, 3, 4, 5, 6, 10, 11};
      hasc = ic inside {3, 4, 5, 7, 8};
      i10bytes = {$urandom, $urandom, $urandom};
      i10bytes[7:0] = {ic, fn};
      if (regs) begin i10bytes[15:8] = {ra, rb}; i10bytes[79:16] = c; end
      else i10bytes[71:8] = c;
      F.predPC = pc; M_icode = I_NOP; W_icode = I_NOP;
      valP = pc + 1 + (regs ? 1 : 0) + (hasc ? 8 : 0);
      pred = (ic == 7 || ic == 8) ? c : (ic == 0) ? pc : valP;
      #1;
      check(f_pc == pc, $sformatf("icode %h: f_pc", ic));
      check(f_out.icode == icode_e'(ic) && f_out.ifun == fn, $sformatf("icode %h: icode/ifun", ic));
      check(f_out.rA == (regs ? ra : 4'hF) && f_out.rB == (regs ? rb : 4'hF), $sformatf("icode %h: rA/rB", ic));
      if (hasc) check(f_out.valC == c, $sformatf("icode %h: valC", ic));
      check(f_out.valP == valP, $sformatf("icode %h: valP %h expected %h", ic, f_out.valP, valP));
      check(f_predPC == pred, $sformatf("icode %h: predPC", ic));
      check(f_out.stat == ((ic == 0) ? S_HLT : S_AOK), $sformatf("icode %h: stat", ic));
    end
    // invalid code
    i10bytes[7:0] = 8'hE0; #1;
    check(f_out.stat == S_INS && f_out.icode == I_NOP, "invalid instruction marked INS");
    // PC selection
    F.predPC = 64'h100; M_valA = 64'h200; W_valM = 64'h300;
    M_icode = I_JXX; M_Cnd = 0; W_icode = I_NOP; #1;
    check(f_pc == 64'h200, "mispredicted jXX in memory: fetch M_valA");
    M_Cnd = 1; #1;
    check(f_pc == 64'h100, "taken jXX in memory: fetch predicted PC");
    M_icode = I_NOP; W_icode = I_RET; #1;
    check(f_pc == 64'h300, "ret in writeback: fetch W_valM");
    W_icode = I_NOP; #1;
    check(f_pc == 64'h100, "otherwise: fetch predicted PC");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
