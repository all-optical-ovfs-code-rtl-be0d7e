// hardlimiter: quantised model of a Bragg-grating optical hardlimiter.
//
// The N_IN input beams are combined (by a coupler) into one beam whose
// intensity is the number of inputs that carry light.  The grating is
// biased at a limiting value A: an intensity below A is reflected entirely
// and nothing is transmitted; an intensity of A or more transmits A and
// reflects the excess.  With A = 2 and two inputs the transmitted port o1
// is AND and the reflected port o2 is XOR; with A = 1 the transmitted port
// is OR; with A = 3 and three inputs the transmitted port is a three-input
// AND.  These four behaviours are the ones stated for the device; the
// single rule above is the simplest one that gives all of them.
//
// Interface: in[i] is 1 when input beam i carries a unit-intensity pulse.
// o1 and o2 are intensities in units of one input pulse (unnormalised:
// an AND output of intensity 2 is still "2").  Purely combinational.
module hardlimiter #(
  parameter int unsigned N_IN = 2,
  parameter int unsigned A    = 2,
  localparam int unsigned IW  = $clog2(N_IN + 1)
) (
  input  logic [N_IN-1:0] in,
  output logic [IW-1:0]   o1,   // transmitted intensity
  output logic [IW-1:0]   o2    // reflected intensity
);

  logic [IW-1:0] sum;

  always_comb begin
    sum = '0;
    for (int i = 0; i < N_IN; i++) sum = sum + IW'(in[i]);
    if (32'(sum) >= A) begin
      o1 = IW'(A);
      o2 = sum - IW'(A);
    end else begin
      o1 = '0;
      o2 = sum;
    end
  end

endmodule
