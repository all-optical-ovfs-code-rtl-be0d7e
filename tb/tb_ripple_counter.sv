// tb_ripple_counter: counting range and LSB selection for every SF.
//
// For each SF = 2^m (m = 2..9) the one-hot SF code is applied, the counter
// is cleared and then driven by clock pulses with random idle cycles in
// between.  After every clock the counter must hold (pulses mod SF) on its
// top m stages b8..b(9-m), with all stages below at 0; the count must wrap
// to 0 after exactly SF pulses; idle cycles must not move it.  An all-zero
// SF code (SF = 1 or 2) must leave the counter at 0.
module tb_ripple_counter;
  localparam int STAGES = 9;
  int checks = 0, failures = 0;
  int wraps = 0, idles = 0;
  logic clk = 0, rst, clear, ck;
  logic [STAGES:0]   s;
  logic [STAGES-1:0] b;

  ripple_counter dut (.clk(clk), .rst(rst), .clear(clear), .ck(ck), .s(s), .b(b));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_count(int m, int cnt, string what);
    logic [STAGES-1:0] exp;
    exp = STAGES'(cnt) << (STAGES - m);
    checks++;
    if (b !== exp) begin
      failures++;
      $display("FAIL SF=%0d %s: b=%b expected %b", 1 << m, what, b, exp);
    end
  endtask

  initial begin
    int sf, cnt;
    rst = 1; clear = 0; ck = 0; s = '0;
    @(posedge clk); #1;
    rst = 0;
    for (int m = 2; m <= STAGES; m++) begin
      sf = 1 << m;
      s = (STAGES+1)'(sf);
      clear = 1;
      @(posedge clk); #1;
      clear = 0;
      cnt = 0;
      expect_count(m, 0, "after clear");
      for (int p = 0; p < 2 * sf + 3; p++) begin
        // Random idle cycles between clock pulses.
        if ($urandom_range(0, 3) == 0) begin
          ck = 0;
          @(posedge clk); #1;
          idles++;
          expect_count(m, cnt, "idle");
        end
        ck = 1;
        @(posedge clk); #1;
        ck = 0;
        cnt = (cnt + 1) % sf;
        if (cnt == 0) wraps++;
        expect_count(m, cnt, $sformatf("pulse %0d", p + 1));
      end
    end
    // SF = 1 and SF = 2: no clock reaches the counter.
    s = '0;
    clear = 1;
    @(posedge clk); #1;
    clear = 0;
    ck = 1;
    repeat (10) @(posedge clk);
    #1;
    ck = 0;
    checks++;
    if (b !== '0) begin failures++; $display("FAIL counter moved with SF register 0: b=%b", b); end
    checks++;
    if (wraps < 2 * (STAGES - 1)) begin failures++; $display("FAIL only %0d wraps seen", wraps); end
    checks++;
    if (idles == 0) begin failures++; $display("FAIL no idle cycles"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
