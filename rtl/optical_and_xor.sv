// optical_and_xor: two-input AND/XOR gate made of one hardlimiter at a = 2.
//
// Inputs A and B are combined and fall on a hardlimiter biased at 2.  Only
// when both carry light is the combined intensity 2 transmitted, so the
// transmitted port is A AND B; when exactly one carries light the intensity
// 1 is reflected, so the reflected port is A XOR B.  The transmitted
// intensity (0 or 2) is normalised to a 0/1 level here.  Combinational.
module optical_and_xor (
  input  logic a,
  input  logic b,
  output logic and_o,
  output logic xor_o
);

  logic [1:0] o1, o2;

  hardlimiter #(.N_IN(2), .A(2)) u_hl (
    .in ({a, b}),
    .o1 (o1),
    .o2 (o2)
  );

  // Normalise the optical intensities to digital levels.
  assign and_o = (o1 != '0);
  assign xor_o = (o2 != '0);

endmodule
