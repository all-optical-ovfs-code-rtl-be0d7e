// tb_sf_register: loads each spreading-factor code and checks what is held.
//
// For SF = 2^k, k = 2..9, loads the one-hot code and checks the stored
// value, that it holds while load is low, and that SF = 1 and SF = 2 (bits
// S0 and S1) read back as all zeros because those bits are tied to 0.
module tb_sf_register;
  int checks = 0, failures = 0;
  logic clk = 0, rst, load;
  logic [9:0] d, s;

  sf_register dut (.clk(clk), .rst(rst), .load(load), .d(d), .s(s));

  always #5 clk = ~clk;

  task automatic check(string what, logic [9:0] exp);
    checks++;
    if (s !== exp) begin failures++; $display("FAIL %s: s=%b expected %b", what, s, exp); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; load = 0; d = '0;
    @(posedge clk); #1;
    rst = 0;
    check("after reset", 10'b0);
    for (int k = 0; k <= 9; k++) begin
      d = 10'(1 << k); load = 1;
      @(posedge clk); #1;
      load = 0;
      check($sformatf("SF=%0d loaded", 1 << k), (k < 2) ? 10'b0 : 10'(1 << k));
      d = 10'(1 << ((k + 3) % 10));
      repeat (3) @(posedge clk); #1;
      check($sformatf("SF=%0d held", 1 << k), (k < 2) ? 10'b0 : 10'(1 << k));
    end
    rst = 1;
    @(posedge clk); #1;
    rst = 0;
    check("reset again", 10'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
