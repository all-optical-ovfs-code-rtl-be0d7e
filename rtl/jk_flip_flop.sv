// jk_flip_flop: JK flip-flop built from a PSW memory and two optical ANDs.
//
// Two three-input hardlimiter AND gates (a = 3) gate the clock pulse ck:
//   SET   = Q' & J & ck
//   RESET = Q  & K & ck
// and drive the SET and RESET ports of the two-switch memory.  Since SET
// needs Q' and RESET needs Q, only one of them can fire, and a pulse with
// J = K = 1 toggles the state.  This gives the JK truth table: 00 hold,
// 01 clear, 10 set, 11 toggle.  With J and K tied to 1 it is the T
// flip-flop of the counter.
//
// Timing: ck is a one-cycle pulse of clk; q changes on the clk edge that
// samples the pulse.  rst (synchronous) clears q.
module jk_flip_flop (
  input  logic clk,
  input  logic rst,
  input  logic ck,
  input  logic j,
  input  logic k,
  output logic q,
  output logic qn
);

  logic set_p, reset_p;

  optical_and3 u_and_set   (.a(qn), .b(j), .c(ck), .and_o(set_p));
  optical_and3 u_and_reset (.a(q),  .b(k), .c(ck), .and_o(reset_p));

  psw_flip_flop u_mem (
    .clk   (clk),
    .rst   (rst),
    .set   (set_p),
    .reset (reset_p),
    .q     (q),
    .qn    (qn)
  );

endmodule
