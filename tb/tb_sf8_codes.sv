// tb_sf8_codes: the SF = 8 codes C(8,5), C(8,6) and C(8,7).
//
// Loads the SF register with 0000001000 (SF = 8) and the code IDs 6, 5 and
// 7 in turn, and clocks each code for two periods.  Checks that the counter
// runs on b8 b7 b6 with b6 as the fastest-changing bit (b6 toggles on every
// pulse, b7 every second, b8 every fourth), that b5..b0 stay 0, and that
// the chips are
//   C(8,5) = -1 +1 -1 +1 +1 -1 +1 -1
//   C(8,6) = -1 +1 +1 -1 -1 +1 +1 -1
//   C(8,7) = -1 +1 +1 -1 +1 -1 -1 +1
// (written below with 0 for -1 and 1 for +1, first chip leftmost).
module tb_sf8_codes;
  int checks = 0, failures = 0;
  logic clk = 0, rst, ck, sf_load, id_load;
  logic [9:0] sf_in;
  logic [8:0] id_in, b;
  logic code;

  ovsf_code_generator dut (
    .clk(clk), .rst(rst), .ck(ck),
    .sf_load(sf_load), .sf_in(sf_in),
    .id_load(id_load), .id_in(id_in),
    .b(b), .code(code)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_code(int id, logic [7:0] chips);
    logic [8:0] b_prev;
    id_in = 9'(id); id_load = 1;
    @(posedge clk); #1;
    id_load = 0;
    for (int t = 0; t < 16; t++) begin
      checks++;
      if (code !== chips[7 - (t % 8)]) begin
        failures++;
        $display("FAIL C(8,%0d) chip %0d: %b expected %b", id, t, code, chips[7 - (t % 8)]);
      end
      checks++;
      if (b[5:0] !== '0) begin failures++; $display("FAIL b5..b0 not zero: %b", b); end
      b_prev = b;
      ck = 1;
      @(posedge clk); #1;
      ck = 0;
      // b6 toggles on every pulse; b7 when b6 falls; b8 when b7 falls.
      checks++;
      if (b[6] === b_prev[6] ||
          (b[7] !== b_prev[7]) !== (b_prev[6] === 1'b1) ||
          (b[8] !== b_prev[8]) !== (b_prev[7:6] === 2'b11)) begin
        failures++;
        $display("FAIL counter step %b -> %b", b_prev[8:6], b[8:6]);
      end
    end
  endtask

  initial begin
    rst = 1; ck = 0; sf_load = 0; id_load = 0; sf_in = '0; id_in = '0;
    @(posedge clk); #1;
    rst = 0;
    sf_in = 10'b00_0000_1000; sf_load = 1;
    @(posedge clk); #1;
    sf_load = 0;
    run_code(6, 8'b0110_0110);
    run_code(5, 8'b0101_1010);
    run_code(7, 8'b0110_1001);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
