// tb_pipe_reg: checks the stall / bubble / normal register bank.
//
// First the register-bank exercise: an 8-bit register with default 0xFF
// driven with a = 0x01, 0x02, ... and a fixed stall/bubble schedule must
// hold 0xFF, 0x01, 0x01, 0x03, 0xFF, 0x05, 0x06, 0x06, 0x06 at times 0..8.
// Then random stall/bubble/data against a one-line model, and a struct-typed
// instance to check that bubble restores every field of the default.
`timescale 1ns/1ps
module tb_pipe_reg;
  logic clk = 0, rst = 1, stall = 0, bubble = 0;
  logic [7:0] d = 0, q;
  int checks = 0, failures = 0;

  typedef struct packed { logic [3:0] icode; logic [3:0] rA; logic [15:0] v; } s_t;
  localparam s_t SDEF = '{icode: 4'h1, rA: 4'hF, v: 16'h0000};
  s_t sd, sq;

  pipe_reg #(.T(logic [7:0]), .DEFAULT(8'hFF)) dut (.clk, .rst, .stall, .bubble, .d, .q);
  pipe_reg #(.T(s_t), .DEFAULT(SDEF)) dut_s (.clk, .rst, .stall, .bubble, .d(sd), .q(sq));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] exp_b [9] = '{8'hFF, 8'h01, 8'h01, 8'h03, 8'hFF, 8'h05, 8'h06, 8'h06, 8'h06};
  logic       st    [9] = '{0, 1, 0, 0, 0, 0, 1, 1, 0};
  logic       bu    [9] = '{0, 0, 0, 1, 0, 0, 0, 0, 0};

  initial begin
    logic [7:0] model;
    s_t smodel;
    sd = '0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    // time t: a = t+1, stall/bubble as given; B shown is the value at time t
    for (int t = 0; t < 9; t++) begin
      check(q == exp_b[t], $sformatf("exercise time %0d: B=%h expected %h", t, q, exp_b[t]));
      d = 8'(t + 1); stall = st[t]; bubble = bu[t];
      @(negedge clk);
    end
    // random
    model = q; smodel = sq;
    for (int i = 0; i < 500; i++) begin
      d = 8'($urandom); sd = s_t'($urandom);
      case ($urandom_range(0, 3))
        0: begin stall = 1; bubble = 0; end
        1: begin stall = 0; bubble = 1; end
        default: begin stall = 0; bubble = 0; end
      endcase
      @(posedge clk);
      if (bubble) begin model = 8'hFF; smodel = SDEF; end
      else if (!stall) begin model = d; smodel = sd; end
      @(negedge clk);
      check(q == model, $sformatf("random %0d: q=%h expected %h", i, q, model));
      check(sq == smodel, $sformatf("random %0d: struct q=%h expected %h", i, sq, smodel));
    end
    stall = 0; bubble = 0; d = 8'h5A;
    rst = 1; @(negedge clk);
    check(q == 8'hFF && sq == SDEF, "reset loads the default");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
