// tb_execute_stage: ALU operand selection, the four OPq functions,
// condition codes (set only by OPq) and all seven conditions, compared with
// an independent model; cmovXX that fails its condition drops dstE.
`timescale 1ns/1ps
module tb_execute_stage;
  import y86_pkg::*;
  logic clk = 0, rst = 1;
  e_reg_t E;
  word_t e_valE;
  reg_t e_dstE;
  logic e_Cnd;
  m_reg_t e_out;
  logic [2:0] cc;
  int checks = 0, failures = 0;

  execute_stage dut (.*);
  always #5 clk = ~clk;

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

  function automatic logic cnd(logic [3:0] fn, logic z, logic s, logic o);
    case (fn)
      0: return 1; 1: return (s ^ o) | z; 2: return s ^ o; 3: return z;
      4: return !z; 5: return !(s ^ o); 6: return !(s ^ o) && !z;
      default: return 0;
    endcase
  endfunction

  initial begin
    logic z, s, o;
    E = E_BUBBLE;
    @(negedge clk); @(negedge clk); rst = 0;
    z = 1; s = 0; o = 0;
    for (int i = 0; i < 4000; i++) begin
      logic [3:0] ic, fn;
      word_t a, b, r, va, vb, vc;
      logic nz, ns, no;
      ic = 4'($urandom_range(0, 11));
      fn = (ic == 6) ? 4'($urandom_range(0, 3)) : 4'($urandom_range(0, 6));
      va = ($urandom_range(0, 3) == 0) ? {$urandom_range(0, 1) ? 32'h8000_0000 : 32'h7fff_ffff, $urandom} : {$urandom, $urandom};
      vb = ($urandom_range(0, 3) == 0) ? va : {$urandom, $urandom};
      vc = {$urandom, $urandom};
      E = '{stat: S_AOK, icode: icode_e'(ic), ifun: fn, valC: vc, valA: va, valB: vb,
            dstE: 4'($urandom_range(0, 14)), dstM: 4'hF, srcA: 4'hF, srcB: 4'hF};
      case (ic)
        2, 6:    a = va;
        3, 4, 5: a = vc;
        8, 10:   a = -64'sd8;
        9, 11:   a = 64'd8;
        default: a = 0;
      endcase
      b = (ic inside {4, 5, 6, 8, 9, 10, 11}) ? vb : 64'd0;
      no = 0;
      if (ic == 6 && fn == 1) begin r = b - a; no = (a[63] != b[63]) && (r[63] != b[63]); end
      else if (ic == 6 && fn == 2) r = b & a;
      else if (ic == 6 && fn == 3) r = b ^ a;
      else begin r = b + a; no = (a[63] == b[63]) && (r[63] != a[63]); end
      nz = (r == 0); ns = r[63];
      #1;
      check(e_valE == r, $sformatf("%0d icode %h fn %h: valE %h expected %h", i, ic, fn, e_valE, r));
      check(e_Cnd == cnd(fn, z, s, o), $sformatf("%0d: Cnd", i));
      check(e_dstE == ((ic == 2 && !cnd(fn, z, s, o)) ? 4'hF : E.dstE), $sformatf("%0d: e_dstE", i));
      check(e_out.valA == va && e_out.valE == r, $sformatf("%0d: M register contents", i));
      @(posedge clk);
      if (ic == 6) begin z = nz; s = ns; o = no; end
      @(negedge clk);
      check(cc == {z, s, o}, $sformatf("%0d: condition codes %b expected %b", i, cc, {z, s, o}));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
