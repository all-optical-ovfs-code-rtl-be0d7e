// tb_optical_and_xor: exhaustive truth-table check of the a = 2 gate.
module tb_optical_and_xor;
  int checks = 0, failures = 0;
  logic a, b, and_o, xor_o;

  optical_and_xor dut (.a(a), .b(b), .and_o(and_o), .xor_o(xor_o));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // {a, b, and, xor}
    logic [3:0] table_rows [4] = '{4'b0000, 4'b0101, 4'b1001, 4'b1110};
    foreach (table_rows[r]) begin
      {a, b} = table_rows[r][3:2];
      #1;
      checks++;
      if (and_o !== table_rows[r][1]) begin failures++; $display("FAIL AND a=%b b=%b", a, b); end
      checks++;
      if (xor_o !== table_rows[r][0]) begin failures++; $display("FAIL XOR a=%b b=%b", a, b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
