// ovsf_code_generator: OVSF channelization code generator, SF = 4 to 512.
//
// Produces the chips of code C(SF,N) of the OVSF code tree, one chip per
// clock pulse ck.  The SF register holds SF one-hot and lets the clock
// into the counter stage that becomes the LSB, so the counter runs 0 to
// SF-1 on its top log2(SF) stages.  The counter bits are ANDed with the
// code ID N (ID LSB with counter MSB) and XORed to give the chip.  All
// gates are hardlimiter gates and all flip-flops JK flip-flops built on a
// two-switch set/reset memory, as in the optical circuit this follows;
// here they are clocked by a system clock clk and the optical clock pulse
// is the one-cycle enable ck.
//
// Interface: load a spreading factor with sf_load/sf_in (S9..S0, one-hot)
// and a code ID with id_load/id_in (n8..n0).  Either load also restarts the
// counter at 0 (this design's choice), so the chip after a load is chip 0
// of the new code.  code is the current chip (0 = -1, 1 = +1) and b the
// counter bits b8..b0.  Each ck pulse advances to the next chip on the
// following clk edge; the code repeats every SF pulses.  rst is
// synchronous and clears the registers and counter (SF register 0: counter
// idle).
module ovsf_code_generator
  import ovsf_pkg::*;
#(
  parameter int unsigned STAGES = OVSF_STAGES
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              ck,
  input  logic              sf_load,
  input  logic [STAGES:0]   sf_in,
  input  logic              id_load,
  input  logic [STAGES-1:0] id_in,
  output logic [STAGES-1:0] b,
  output logic              code
);

  logic [STAGES:0]   s;
  logic [STAGES-1:0] n;

  sf_register #(.WIDTH(STAGES + 1)) u_sf_reg (
    .clk  (clk),
    .rst  (rst),
    .load (sf_load),
    .d    (sf_in),
    .s    (s)
  );

  code_id_register #(.WIDTH(STAGES)) u_id_reg (
    .clk  (clk),
    .rst  (rst),
    .load (id_load),
    .d    (id_in),
    .n    (n)
  );

  ripple_counter #(.STAGES(STAGES)) u_counter (
    .clk   (clk),
    .rst   (rst),
    .clear (sf_load | id_load),
    .ck    (ck),
    .s     (s),
    .b     (b)
  );

  ovsf_code_logic #(.STAGES(STAGES)) u_logic (
    .n    (n),
    .b    (b),
    .code (code)
  );

endmodule
