// tb_memory_stage: address choice (valE, or valA for popq/ret), read and
// write enables per instruction, store data and the W register contents.
`timescale 1ns/1ps
module tb_memory_stage;
  import y86_pkg::*;
  m_reg_t M;
  word_t mem_addr, mem_wdata, mem_rdata, m_valM;
  logic mem_write, mem_read;
  w_reg_t m_out;
  int checks = 0, failures = 0;

  memory_stage dut (.*);

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
    for (int i = 0; i < 1200; i++) begin
      logic [3:0] ic;
      bit rd, wr;
      ic = 4'(i % 12);
      M = '{stat: S_AOK, icode: icode_e'(ic), Cnd: 1'b1, valE: {$urandom, $urandom},
            valA: {$urandom, $urandom}, dstE: 4'($urandom), dstM: 4'($urandom)};
      mem_rdata = {$urandom, $urandom};
      rd = ic inside {5, 9, 11};
      wr = ic inside {4, 8, 10};
      #1;
      check(mem_read == rd && mem_write == wr, $sformatf("icode %h: read/write enables", ic));
      if (rd || wr)
        check(mem_addr == ((ic == 9 || ic == 11) ? M.valA : M.valE), $sformatf("icode %h: address", ic));
      if (wr) check(mem_wdata == M.valA, $sformatf("icode %h: store data", ic));
      check(m_valM == (rd ? mem_rdata : 64'd0), $sformatf("icode %h: valM", ic));
      check(m_out.valE == M.valE && m_out.valM == m_valM && m_out.dstE == M.dstE &&
            m_out.dstM == M.dstM && m_out.icode == M.icode, $sformatf("icode %h: W contents", ic));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
