// ripple_counter: counter of T flip-flops with an SF-selected LSB.
//
// STAGES T flip-flops (JK flip-flops with J = K = 1) hold b0..b(STAGES-1);
// b(STAGES-1) is always the MSB.  The clock pulse ck is ANDed with each SF
// register bit: S_k feeds stage b(STAGES-k), so the one set bit of the SF
// register picks which stage receives the clock and so becomes the LSB.
// With STAGES = 9: SF = 4 (S2) counts on b8 b7, SF = 8 (S3) on b8 b7 b6,
// ..., SF = 512 (S9) on all nine stages.  Each stage's clock is the OR of
// its gated clock and the carry from the stage below, so the stages above
// the LSB ripple as in a binary ripple counter and the counter runs
// 0, 1, ..., SF-1, 0, ... on the selected bits, one step per ck pulse.
// Stages below the LSB get no clock and stay 0.
//
// Timing: in this synchronous version a stage's carry is the one-cycle
// pulse "this stage is toggling from 1 to 0", formed by one more optical
// AND of the stage's clock and its Q; the whole ripple settles within the
// clk cycle, so b moves by one count on the clk edge that samples a ck
// pulse.  Using the falling 1->0 transition as carry is this design's
// choice; the optical circuit takes the previous stage's Q into the OR
// directly and relies on its pulse timing.  clear (synchronous, like rst)
// restarts the count at 0 and is used whenever SF or N is reloaded.
module ripple_counter #(
  parameter int unsigned STAGES = 9
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              clear,
  input  logic              ck,
  input  logic [STAGES:0]   s,      // SF register S(STAGES)..S0
  output logic [STAGES-1:0] b       // counter outputs b(STAGES-1)..b0
);

  logic [STAGES-1:0] inj;     // ck AND S_k, the clock injected at each stage
  logic [STAGES-1:0] pulse;   // clock pulse of each T flip-flop
  logic [STAGES-1:0] carry;   // stage is wrapping from 1 to 0
  logic [STAGES-1:0] bn;      // Q' outputs
  logic [STAGES-1:0] cin;     // carry into each stage
  logic              ff_rst;

  assign ff_rst = rst | clear;
  assign cin[0] = 1'b0;

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    // Clock injection: optical AND of the clock and SF register bit.
    optical_and_xor u_inj (.a(ck), .b(s[STAGES-i]), .and_o(inj[i]), .xor_o());

    // Stage clock: optical OR of the injected clock and the carry.
    optical_or u_or (.a(inj[i]), .b(cin[i]), .or_o(pulse[i]));

    // T flip-flop: JK flip-flop with both inputs tied to logic 1.
    jk_flip_flop u_tff (
      .clk (clk),
      .rst (ff_rst),
      .ck  (pulse[i]),
      .j   (1'b1),
      .k   (1'b1),
      .q   (b[i]),
      .qn  (bn[i])
    );

    // Carry to the next stage when this one toggles from 1 to 0.
    optical_and_xor u_carry (.a(pulse[i]), .b(b[i]), .and_o(carry[i]), .xor_o());
    if (i + 1 < STAGES) begin : g_cin
      assign cin[i+1] = carry[i];
    end
  end

endmodule
