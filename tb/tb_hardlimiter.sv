// tb_hardlimiter: exhaustive check of the hardlimiter model.
//
// Instantiates the three biases the generator uses (a = 2 with two
// inputs, a = 1 with two inputs, a = 3 with three inputs) and checks every
// input combination against the stated device behaviour: below the limit
// all light is reflected, at or above it the limit value is transmitted
// and the excess reflected.  The two-input cases are also checked against
// the literal table of the device (e.g. a = 2, one input lit: O1 = 0,
// O2 = 1; both lit: O1 = 2, O2 = 0).
module tb_hardlimiter;
  int checks = 0, failures = 0;

  logic [1:0] in2;
  logic [2:0] in3;
  logic [1:0] and_o1, and_o2, or_o1, or_o2, a3_o1, a3_o2;

  hardlimiter #(.N_IN(2), .A(2)) u_a2 (.in(in2), .o1(and_o1), .o2(and_o2));
  hardlimiter #(.N_IN(2), .A(1)) u_a1 (.in(in2), .o1(or_o1),  .o2(or_o2));
  hardlimiter #(.N_IN(3), .A(3)) u_a3 (.in(in3), .o1(a3_o1),  .o2(a3_o2));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Expected (O1, O2) for two inputs, written out case by case.
  function automatic void exp2(int a, int x, int y, output int o1, output int o2);
    int s = x + y;
    if (a == 2) begin
      case (s) 0: begin o1 = 0; o2 = 0; end
               1: begin o1 = 0; o2 = 1; end
               default: begin o1 = 2; o2 = 0; end
      endcase
    end else begin
      case (s) 0: begin o1 = 0; o2 = 0; end
               1: begin o1 = 1; o2 = 0; end
               default: begin o1 = 1; o2 = 1; end
      endcase
    end
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e1, e2, s;
    for (int v = 0; v < 4; v++) begin
      in2 = 2'(v);
      #1;
      exp2(2, v & 1, v >> 1, e1, e2);
      check($sformatf("a=2 in=%b O1", in2), int'(and_o1), e1);
      check($sformatf("a=2 in=%b O2", in2), int'(and_o2), e2);
      exp2(1, v & 1, v >> 1, e1, e2);
      check($sformatf("a=1 in=%b O1", in2), int'(or_o1), e1);
      check($sformatf("a=1 in=%b O2", in2), int'(or_o2), e2);
    end
    for (int v = 0; v < 8; v++) begin
      in3 = 3'(v);
      #1;
      s = $countones(in3);
      check($sformatf("a=3 in=%b O1", in3), int'(a3_o1), (s == 3) ? 3 : 0);
      check($sformatf("a=3 in=%b O2", in3), int'(a3_o2), (s == 3) ? 0 : s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
