// optical_and3: three-input AND gate made of one hardlimiter at a = 3.
//
// The three input beams are combined and fall on a hardlimiter biased at 3,
// so light is transmitted only when all three carry light.  The JK
// flip-flop uses two of these to form its SET and RESET pulses from Q or
// Q', the J or K input and the clock pulse.  The transmitted intensity
// (0 or 3) is normalised to a 0/1 level.  Combinational.
module optical_and3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic and_o
);

  logic [1:0] o1, o2;

  hardlimiter #(.N_IN(3), .A(3)) u_hl (
    .in ({a, b, c}),
    .o1 (o1),
    .o2 (o2)
  );

  assign and_o = (o1 != '0);

  // Below the limit all light is reflected; at the limit none is.
  always_comb assert ((o1 == '0) == (o2 != '0) || {a, b, c} == 3'b000);

endmodule
