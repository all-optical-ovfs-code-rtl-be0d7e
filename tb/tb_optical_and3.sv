// tb_optical_and3: exhaustive truth-table check of the a = 3 AND gate.
module tb_optical_and3;
  int checks = 0, failures = 0;
  logic a, b, c, and_o;

  optical_and3 dut (.a(a), .b(b), .c(c), .and_o(and_o));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (and_o !== (v == 7)) begin failures++; $display("FAIL AND3 in=%03b got %b", v[2:0], and_o); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
