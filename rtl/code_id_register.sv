// code_id_register: OVSF code ID register n8..n0.
//
// Holds the branch number N of the channelization code C(SF,N) that the
// generator produces.  Only the low log2(SF) bits of N take part for a
// given SF (the counter stages below the selected LSB stay 0).
//
// Interface: d is loaded when load is high, on the rising edge of clk; n
// is the stored value.  rst (synchronous) clears it to N = 0.  The load
// strobe and reset value are this design's own choices.
module code_id_register #(
  parameter int unsigned WIDTH = 9
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] n
);

  always_ff @(posedge clk) begin
    if (rst)       n <= '0;
    else if (load) n <= d;
  end

endmodule
