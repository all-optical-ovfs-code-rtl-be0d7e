// sf_register: spreading-factor register S9..S0.
//
// Holds the spreading factor as a one-hot value: SF = 2^k is stored with
// only bit S_k set (SF = 4 -> 0000000100, SF = 8 -> 0000001000, ...,
// SF = 512 -> 1000000000).  Bit S_k lets the clock into counter stage
// b(9-k), which makes that stage the counter's LSB.  S1 and S0 are
// hard-wired to 0, as in the counter's logic diagram, so SF = 1 and SF = 2
// leave the counter idle.
//
// Interface: d is loaded when load is high, on the rising edge of clk; s
// is the stored value.  rst (synchronous) clears it to all zeros, i.e. no
// clock is let into the counter until a spreading factor is loaded.  The
// reset value and load strobe are this design's own choices.  A value with
// more than one bit set would inject the clock at several stages; an
// assertion rejects it.
module sf_register
  import ovsf_pkg::*;
#(
  parameter int unsigned WIDTH = 10
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] s
);

  localparam int unsigned LO = OVSF_MIN_LOG2_SF;   // S1, S0 tied to 0

  logic [WIDTH-1:LO] s_q;

  always_ff @(posedge clk) begin
    if (rst)       s_q <= '0;
    else if (load) s_q <= d[WIDTH-1:LO];
  end

  assign s = {s_q, LO'(0)};

  a_one_hot_load : assert property (@(posedge clk) disable iff (rst) load |-> $onehot0(d));

endmodule
