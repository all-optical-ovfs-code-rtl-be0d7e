// tb_ovsf_code_logic: the AND/XOR network against the code equation and
// against the SF = 8 code table.
//
// First all 512 x 512 combinations of code ID n and counter value b are
// compared with code = XOR over k of (n_k AND b_(8-k)).  Then, with the
// counter running on b8 b7 b6 (SF = 8), every chip of the eight codes
// C(8,0)..C(8,7) is compared with the table of expected chips.
module tb_ovsf_code_logic;
  localparam int STAGES = 9;
  int checks = 0, failures = 0;
  logic [STAGES-1:0] n, b;
  logic code;

  ovsf_code_logic dut (.n(n), .b(b), .code(code));

  // Expected chips of C(8,N) for counter values 000..111, MSB first
  // (0 stands for -1, 1 for +1).
  localparam logic [7:0] C8 [8] = '{
    8'b0000_0000, 8'b0000_1111, 8'b0011_0011, 8'b0011_1100,
    8'b0101_0101, 8'b0101_1010, 8'b0110_0110, 8'b0110_1001
  };

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    int bad = 0;
    for (int vn = 0; vn < 512; vn++) begin
      for (int vb = 0; vb < 512; vb++) begin
        n = STAGES'(vn); b = STAGES'(vb);
        #1;
        exp = 1'b0;
        for (int k = 0; k < STAGES; k++) exp ^= n[k] & b[STAGES-1-k];
        checks++;
        if (code !== exp) begin
          failures++;
          if (bad++ < 10) $display("FAIL n=%b b=%b code=%b exp=%b", n, b, code, exp);
        end
      end
    end
    for (int id = 0; id < 8; id++) begin
      for (int t = 0; t < 8; t++) begin
        n = STAGES'(id);
        b = STAGES'(t) << 6;    // counter value on b8 b7 b6
        #1;
        checks++;
        if (code !== C8[id][7-t]) begin
          failures++;
          $display("FAIL C(8,%0d) chip %0d: %b expected %b", id, t, code, C8[id][7-t]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
