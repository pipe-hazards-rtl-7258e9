// pipe_reg: a pipeline register bank with stall and bubble control.
//
// Every pipeline register of the processors in this design is one of these.
// On each rising clock edge it does one of three things:
//   normal (stall=0, bubble=0): load the new value d;
//   stall  (stall=1):           keep the old value for all fields;
//   bubble (bubble=1):          load DEFAULT, the no-op value of every field.
// Reset loads DEFAULT as well, so a freshly reset pipeline is full of
// bubbles. The three modes and "default value on bubble" follow the
// register-bank model of the design; asserting stall and bubble together is
// a control error (checked by an assertion) and stall then wins.
//
// Interface: T is the register's contents (a packed struct or a vector),
// DEFAULT its bubble/reset value. q is the registered output; no
// combinational path from d to q.
module pipe_reg #(
  parameter type T       = logic [7:0],
  parameter T    DEFAULT = T'(8'hFF)
) (
  input  logic clk,
  input  logic rst,
  input  logic stall,
  input  logic bubble,
  input  T     d,
  output T     q
);

  always_ff @(posedge clk) begin
    if (rst)         q <= DEFAULT;
    else if (stall)  q <= q;
    else if (bubble) q <= DEFAULT;
    else             q <= d;
  end

  a_not_both: assert property (@(posedge clk) disable iff (rst) !(stall && bubble))
    else $error("pipe_reg: stall and bubble asserted together");

endmodule
