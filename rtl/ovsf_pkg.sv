// ovsf_pkg: constants shared by the OVSF code generator.
//
// The generator follows the 9-bit organisation of the logic design it is
// built from: a 9-bit code ID register n8..n0, a 9-stage counter b8..b0 and
// a 10-bit spreading-factor register S9..S0 that holds SF as a one-hot
// value, so spreading factors 4 to 512 are supported.  Chips are encoded as
// 0 for -1 and 1 for +1.
package ovsf_pkg;

  // Number of counter stages and code ID bits.
  localparam int unsigned OVSF_STAGES = 9;

  // Smallest supported spreading factor is 4: the SF register bits S1 and
  // S0 are hard-wired to 0, so SF = 1 and SF = 2 leave the counter idle.
  localparam int unsigned OVSF_MIN_LOG2_SF = 2;

endpackage
