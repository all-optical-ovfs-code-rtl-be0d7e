// optical_or: two-input OR gate made of one hardlimiter at a = 1.
//
// Inputs A and B are combined and fall on a hardlimiter biased at 1.  Any
// light transmits an intensity of 1 (the excess of a second beam is
// reflected), so the transmitted port is A OR B.  The reflected port,
// which carries A AND B, is not used by the generator.  Combinational.
module optical_or (
  input  logic a,
  input  logic b,
  output logic or_o
);

  logic [1:0] o1, o2;

  hardlimiter #(.N_IN(2), .A(1)) u_hl (
    .in ({a, b}),
    .o1 (o1),
    .o2 (o2)
  );

  assign or_o = (o1 != '0);

  // The reflected output can never exceed 1 for two unit inputs.
  always_comb assert (o2 <= 2'd1);

endmodule
