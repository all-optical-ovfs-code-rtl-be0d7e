// psw_flip_flop: set/reset memory of two coupled polarization switches.
//
// In the optical part two polarization switches suppress each other: the
// light of PSW1 saturates the amplifier of PSW2 and vice versa, so exactly
// one of them lases.  A pulse on SET (into PSW1) leaves the pair in state 1
// (Q lit), a pulse on RESET (into PSW2) in state 2 (Q' lit).  This module
// is the synchronous digital equivalent: a single state bit q, with the two
// complementary outputs q and qn.
//
// Timing: set and reset are sampled on the rising edge of clk; q changes
// on that edge.  rst (synchronous) puts the memory in state 2 (q = 0); the
// reset state is this design's own choice.  set and reset must not be
// active together, which the JK gating guarantees; an assertion checks it.
module psw_flip_flop (
  input  logic clk,
  input  logic rst,
  input  logic set,
  input  logic reset,
  output logic q,
  output logic qn
);

  always_ff @(posedge clk) begin
    if (rst)        q <= 1'b0;
    else if (set)   q <= 1'b1;
    else if (reset) q <= 1'b0;
  end

  assign qn = ~q;

  a_set_reset_exclusive : assert property (@(posedge clk) disable iff (rst) !(set && reset));

endmodule
