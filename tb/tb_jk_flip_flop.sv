// tb_jk_flip_flop: random J, K and clock pulses against the JK truth table.
//
// Without a clock pulse the state holds; with one, JK = 00 holds, 01
// clears, 10 sets and 11 toggles.  Checks q and qn after every clock and
// that each of the four JK cases was exercised with a pulse.
module tb_jk_flip_flop;
  int checks = 0, failures = 0;
  logic clk = 0, rst, ck, j, k, q, qn;
  logic model;
  int seen [4];

  jk_flip_flop dut (.clk(clk), .rst(rst), .ck(ck), .j(j), .k(k), .q(q), .qn(qn));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; ck = 0; j = 0; k = 0;
    @(posedge clk); #1;
    rst = 0; model = 0;
    for (int i = 0; i < 2000; i++) begin
      ck = $urandom_range(0, 3) != 0;
      j = 1'($urandom); k = 1'($urandom);
      @(posedge clk); #1;
      if (ck) begin
        seen[{j, k}]++;
        case ({j, k})
          2'b00: ;
          2'b01: model = 0;
          2'b10: model = 1;
          2'b11: model = ~model;
        endcase
      end
      checks++;
      if (q !== model || qn !== ~model) begin
        failures++;
        $display("FAIL step %0d ck=%b j=%b k=%b q=%b exp=%b", i, ck, j, k, q, model);
      end
    end
    foreach (seen[c]) begin
      checks++;
      if (seen[c] == 0) begin failures++; $display("FAIL JK=%02b never clocked", c[1:0]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
