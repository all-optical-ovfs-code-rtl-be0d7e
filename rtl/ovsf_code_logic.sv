// ovsf_code_logic: AND/XOR network that forms the OVSF code chip.
//
// Computes
//   code = (n0 & b8) ^ (n1 & b7) ^ ... ^ (n8 & b0)
// i.e. code ID bit n_k is ANDed with counter bit b(STAGES-1-k), pairing the
// ID's LSB with the counter's MSB.  Each AND is the transmitted port of a
// two-input hardlimiter at a = 2; the STAGES products are then summed
// modulo 2 by a chain of STAGES-1 two-input optical XORs (the reflected
// port of the same kind of gate).  Because the counter stages below the
// SF-selected LSB are held at 0, the same network serves every spreading
// factor.  Chips are 0 for -1 and 1 for +1.  Combinational.
module ovsf_code_logic #(
  parameter int unsigned STAGES = 9
) (
  input  logic [STAGES-1:0] n,      // code ID n(STAGES-1)..n0
  input  logic [STAGES-1:0] b,      // counter b(STAGES-1)..b0
  output logic              code
);

  logic [STAGES-1:0] prod;   // n_k AND b(STAGES-1-k)
  logic [STAGES-1:0] acc;    // running modulo-2 sum

  for (genvar k = 0; k < STAGES; k++) begin : g_and
    optical_and_xor u_and (.a(n[k]), .b(b[STAGES-1-k]), .and_o(prod[k]), .xor_o());
  end

  assign acc[0] = prod[0];
  for (genvar k = 1; k < STAGES; k++) begin : g_xor
    optical_and_xor u_xor (.a(acc[k-1]), .b(prod[k]), .and_o(), .xor_o(acc[k]));
  end

  assign code = acc[STAGES-1];

endmodule
