// tb_optical_or: exhaustive truth-table check of the a = 1 OR gate.
module tb_optical_or;
  int checks = 0, failures = 0;
  logic a, b, or_o;

  optical_or dut (.a(a), .b(b), .or_o(or_o));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] table_rows [4] = '{3'b000, 3'b011, 3'b101, 3'b111};
    foreach (table_rows[r]) begin
      {a, b} = table_rows[r][2:1];
      #1;
      checks++;
      if (or_o !== table_rows[r][0]) begin failures++; $display("FAIL OR a=%b b=%b", a, b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
