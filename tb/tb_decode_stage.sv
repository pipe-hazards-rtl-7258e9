// tb_decode_stage: register selection and forwarding priority.
//
// Random instructions and random producer destinations in execute, memory
// and writeback; the expected srcA/srcB/dstE/dstM follow the Y86-64 rules
// and the expected valA/valB the forwarding order e_valE, m_valM, M_valE,
// W_valM, W_valE, register file (valP for call/jXX valA).
`timescale 1ns/1ps
module tb_decode_stage;
  import y86_pkg::*;
  d_reg_t D;
  reg_t d_srcA, d_srcB, e_dstE, M_dstM, M_dstE, W_dstM, W_dstE;
  word_t rf_valA, rf_valB, e_valE, m_valM, M_valE, W_valM, W_valE;
  e_reg_t d_out;
  fwd_e fwdA, fwdB;
  int checks = 0, failures = 0;
  int seen [7];

  decode_stage dut (.*);

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

  function automatic word_t fwd(reg_t s, word_t rf);
    if (s == 4'hF) return rf;
    if (s == e_dstE) return e_valE;
    if (s == M_dstM) return m_valM;
    if (s == M_dstE) return M_valE;
    if (s == W_dstM) return W_valM;
    if (s == W_dstE) return W_valE;
    return rf;
  endfunction

  initial begin
    foreach (seen[i]) seen[i] = 0;
    for (int i = 0; i < 5000; i++) begin
      logic [3:0] ic, sa, sb, de, dm;
      word_t ea, eb;
      ic = 4'($urandom_range(0, 11));
      D = '{stat: S_AOK, icode: icode_e'(ic), ifun: 4'($urandom_range(0, 3)),
            rA: 4'($urandom_range(0, 15)), rB: 4'($urandom_range(0, 15)),
            valC: {$urandom, $urandom}, valP: {$urandom, $urandom}};
      // producers drawn from a few registers so that matches are frequent
      e_dstE = 4'($urandom_range(0, 5)); M_dstM = 4'($urandom_range(0, 5));
      M_dstE = 4'($urandom_range(0, 5)); W_dstM = 4'($urandom_range(0, 5));
      W_dstE = 4'($urandom_range(0, 5));
      if ($urandom_range(0, 1)) D.rA = 4'($urandom_range(0, 5));
      if ($urandom_range(0, 1)) D.rB = 4'($urandom_range(0, 5));
      rf_valA = {$urandom, $urandom}; rf_valB = {$urandom, $urandom};
      e_valE = {$urandom, $urandom}; m_valM = {$urandom, $urandom}; M_valE = {$urandom, $urandom};
      W_valM = {$urandom, $urandom}; W_valE = {$urandom, $urandom};
      sa = (ic inside {2, 4, 6, 10}) ? D.rA : (ic inside {9, 11}) ? 4'h4 : 4'hF;
      sb = (ic inside {6, 4, 5}) ? D.rB : (ic inside {10, 11, 8, 9}) ? 4'h4 : 4'hF;
      de = (ic inside {2, 3, 6}) ? D.rB : (ic inside {10, 11, 8, 9}) ? 4'h4 : 4'hF;
      dm = (ic inside {5, 11}) ? D.rA : 4'hF;
      ea = (ic inside {7, 8}) ? D.valP : fwd(sa, rf_valA);
      eb = fwd(sb, rf_valB);
      #1;
      seen[int'(fwdA)]++; seen[int'(fwdB)]++;
      check(d_srcA == sa && d_srcB == sb, $sformatf("%0d icode %h: srcA/srcB", i, ic));
      check(d_out.dstE == de && d_out.dstM == dm, $sformatf("%0d icode %h: dstE/dstM", i, ic));
      check(d_out.valA == ea, $sformatf("%0d icode %h: valA", i, ic));
      check(d_out.valB == eb, $sformatf("%0d icode %h: valB", i, ic));
      check(d_out.valC == D.valC && d_out.icode == D.icode, $sformatf("%0d: pass-through", i));
    end
    for (int s = 0; s < 7; s++) check(seen[s] > 0, $sformatf("forwarding source %0d exercised", s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
