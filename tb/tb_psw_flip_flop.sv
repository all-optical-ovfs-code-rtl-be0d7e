// tb_psw_flip_flop: random set/reset pulses against a reference state bit.
//
// Drives random, never simultaneous, SET and RESET pulses and checks after
// every clock that q follows the last pulse (set -> 1, reset -> 0, none ->
// hold) and that qn is always its complement.
module tb_psw_flip_flop;
  int checks = 0, failures = 0;
  logic clk = 0, rst, set, reset, q, qn;
  logic model;

  psw_flip_flop dut (.clk(clk), .rst(rst), .set(set), .reset(reset), .q(q), .qn(qn));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r;
    rst = 1; set = 0; reset = 0;
    @(posedge clk); #1;
    rst = 0; model = 0;
    checks++; if (q !== 1'b0) begin failures++; $display("FAIL reset state"); end
    for (int i = 0; i < 1000; i++) begin
      r = $urandom_range(0, 2);
      set = (r == 1); reset = (r == 2);
      @(posedge clk); #1;
      if (r == 1) model = 1; else if (r == 2) model = 0;
      checks++;
      if (q !== model || qn !== ~model) begin
        failures++;
        $display("FAIL step %0d set=%b reset=%b q=%b qn=%b exp=%b", i, set, reset, q, qn, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
