// y86_tb_pkg: program builder and instruction-level reference model for
// the processor testbenches.
//
// The emit_* functions append Y86-64 machine code to prog[] (little-endian
// constants, icode/ifun in byte 0, rA/rB in byte 1). ref_run() executes the
// program one instruction at a time, with no pipeline, and records the
// final registers, the number of executed instructions (halt included) and
// the hazard events a five-stage pipeline with forwarding, taken-branch
// prediction and ret stalling must pay for:
//   n_ret       every ret             -> 3 bubbles
//   n_mispred   every jXX not taken   -> 2 bubbles
//   n_loaduse   mrmovq/popq whose destination is read by the very next
//               instruction           -> 1 bubble
// so the pipeline must retire all instructions within
// n_instr + 3*n_ret + 2*n_mispred + n_loaduse cycles.
package y86_tb_pkg;

  localparam int PROG_MAX = 1024;

  logic [7:0]  prog [PROG_MAX];
  int          plen;

  longint unsigned ref_reg [15];
  logic [7:0]  ref_mem [longint unsigned];
  int          n_instr, n_ret, n_mispred, n_loaduse;

  function automatic void prog_clear();
    for (int i = 0; i < PROG_MAX; i++) prog[i] = 8'h00;   // halt
    plen = 0;
  endfunction

  function automatic void emit_byte(logic [7:0] b);
    prog[plen] = b;
    plen++;
  endfunction

  function automatic void emit_word(longint unsigned w);
    for (int k = 0; k < 8; k++) emit_byte(w[8*k +: 8]);
  endfunction

  function automatic void emit_halt();                 emit_byte(8'h00); endfunction
  function automatic void emit_nop();                  emit_byte(8'h10); endfunction
  function automatic void emit_rr(logic [3:0] fn, logic [3:0] ra, logic [3:0] rb);
    emit_byte({4'h2, fn}); emit_byte({ra, rb});
  endfunction
  function automatic void emit_irmovq(longint unsigned v, logic [3:0] rb);
    emit_byte(8'h30); emit_byte({4'hF, rb}); emit_word(v);
  endfunction
  function automatic void emit_rmmovq(logic [3:0] ra, longint unsigned d, logic [3:0] rb);
    emit_byte(8'h40); emit_byte({ra, rb}); emit_word(d);
  endfunction
  function automatic void emit_mrmovq(longint unsigned d, logic [3:0] rb, logic [3:0] ra);
    emit_byte(8'h50); emit_byte({ra, rb}); emit_word(d);
  endfunction
  function automatic void emit_opq(logic [3:0] fn, logic [3:0] ra, logic [3:0] rb);
    emit_byte({4'h6, fn}); emit_byte({ra, rb});
  endfunction
  function automatic void emit_jxx(logic [3:0] fn, longint unsigned dest);
    emit_byte({4'h7, fn}); emit_word(dest);
  endfunction
  function automatic void emit_call(longint unsigned dest);
    emit_byte(8'h80); emit_word(dest);
  endfunction
  function automatic void emit_ret();                  emit_byte(8'h90); endfunction
  function automatic void emit_pushq(logic [3:0] ra);  emit_byte(8'hA0); emit_byte({ra, 4'hF}); endfunction
  function automatic void emit_popq(logic [3:0] ra);   emit_byte(8'hB0); emit_byte({ra, 4'hF}); endfunction

  function automatic longint unsigned rd(logic [3:0] r);
    return (r == 4'hF) ? 64'd0 : ref_reg[r];
  endfunction
  function automatic void wr(logic [3:0] r, longint unsigned v);
    if (r != 4'hF) ref_reg[r] = v;
  endfunction
  function automatic longint unsigned fetch_word(longint unsigned a);
    longint unsigned w = 0;
    for (int k = 0; k < 8; k++) w[8*k +: 8] = prog[(a + k) % PROG_MAX];
    return w;
  endfunction
  function automatic longint unsigned mem_rd(longint unsigned a, int bytes);
    longint unsigned w = 0;
    for (int k = 0; k < 8; k++) begin
      longint unsigned ad = (a + k) % bytes;
      w[8*k +: 8] = ref_mem.exists(ad) ? ref_mem[ad] : 8'h00;
    end
    return w;
  endfunction
  function automatic void mem_wr(longint unsigned a, longint unsigned v, int bytes);
    for (int k = 0; k < 8; k++) ref_mem[(a + k) % bytes] = v[8*k +: 8];
  endfunction

  function automatic logic cond(logic [3:0] fn, logic zf, logic sf, logic of_);
    case (fn)
      4'h0: return 1'b1;
      4'h1: return (sf ^ of_) | zf;
      4'h2: return sf ^ of_;
      4'h3: return zf;
      4'h4: return !zf;
      4'h5: return !(sf ^ of_);
      4'h6: return !(sf ^ of_) && !zf;
      default: return 1'b0;
    endcase
  endfunction

  // Registers the next instruction reads, for load/use accounting.
  function automatic void sources(logic [3:0] ic, logic [3:0] ra, logic [3:0] rb,
                                  output logic [3:0] sa, output logic [3:0] sb);
    sa = 4'hF; sb = 4'hF;
    case (ic)
      4'h2, 4'h4, 4'h6, 4'hA: sa = ra;
      4'h9, 4'hB:             sa = 4'h4;
      default: ;
    endcase
    case (ic)
      4'h6, 4'h4, 4'h5:       sb = rb;
      4'hA, 4'hB, 4'h8, 4'h9: sb = 4'h4;
      default: ;
    endcase
  endfunction

  // Run until halt or max_steps, starting from the data-memory contents
  // the caller put in ref_mem (absent bytes read as 0). dmem_bytes is the data-memory size (the
  // hardware wraps addresses modulo it). Returns 1 if halt was reached.
  function automatic bit ref_run(int max_steps, int dmem_bytes);
    longint unsigned pc = 0;
    logic zf = 1, sf = 0, of_ = 0;
    logic [3:0] pend_load = 4'hF;
    for (int i = 0; i < 15; i++) ref_reg[i] = 0;
    n_instr = 0; n_ret = 0; n_mispred = 0; n_loaduse = 0;
    for (int step = 0; step < max_steps; step++) begin
      logic [3:0] ic, fn, ra, rb, sa, sb;
      longint unsigned a, b, r, valC;
      ic = prog[pc % PROG_MAX][7:4];
      fn = prog[pc % PROG_MAX][3:0];
      ra = prog[(pc + 1) % PROG_MAX][7:4];
      rb = prog[(pc + 1) % PROG_MAX][3:0];
      n_instr++;
      sources(ic, ra, rb, sa, sb);
      if (pend_load != 4'hF && (pend_load == sa || pend_load == sb)) n_loaduse++;
      pend_load = 4'hF;
      case (ic)
        4'h0: return 1'b1;
        4'h1: pc = pc + 1;
        4'h2: begin
          if (cond(fn, zf, sf, of_)) wr(rb, rd(ra));
          pc = pc + 2;
        end
        4'h3: begin wr(rb, fetch_word(pc + 2)); pc = pc + 10; end
        4'h4: begin
          mem_wr(rd(rb) + fetch_word(pc + 2), rd(ra), dmem_bytes); pc = pc + 10;
        end
        4'h5: begin
          wr(ra, mem_rd(rd(rb) + fetch_word(pc + 2), dmem_bytes));
          pend_load = ra; pc = pc + 10;
        end
        4'h6: begin
          a = rd(ra); b = rd(rb);
          case (fn)
            4'h0: begin r = b + a; of_ = (a[63] == b[63]) && (r[63] != a[63]); end
            4'h1: begin r = b - a; of_ = (a[63] != b[63]) && (r[63] != b[63]); end
            4'h2: begin r = b & a; of_ = 0; end
            default: begin r = b ^ a; of_ = 0; end
          endcase
          zf = (r == 0); sf = r[63];
          wr(rb, r); pc = pc + 2;
        end
        4'h7: begin
          valC = fetch_word(pc + 1);
          if (cond(fn, zf, sf, of_)) pc = valC;
          else begin pc = pc + 9; n_mispred++; end
        end
        4'h8: begin
          ref_reg[4] = ref_reg[4] - 8;
          mem_wr(ref_reg[4], pc + 9, dmem_bytes);
          pc = fetch_word(pc + 1);
        end
        4'h9: begin
          a = ref_reg[4];
          ref_reg[4] = a + 8;
          pc = mem_rd(a, dmem_bytes);
          n_ret++;
        end
        4'hA: begin
          a = rd(ra);
          ref_reg[4] = ref_reg[4] - 8;
          mem_wr(ref_reg[4], a, dmem_bytes);
          pc = pc + 2;
        end
        4'hB: begin
          a = ref_reg[4];
          ref_reg[4] = a + 8;
          wr(ra, mem_rd(a, dmem_bytes));
          pend_load = ra; pc = pc + 2;
        end
        default: return 1'b1;
      endcase
    end
    return 1'b0;
  endfunction

endpackage
