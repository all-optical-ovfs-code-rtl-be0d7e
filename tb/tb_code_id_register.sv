// tb_code_id_register: random loads and holds of the 9-bit code ID.
module tb_code_id_register;
  int checks = 0, failures = 0;
  logic clk = 0, rst, load;
  logic [8:0] d, n, model;

  code_id_register dut (.clk(clk), .rst(rst), .load(load), .d(d), .n(n));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; load = 0; d = '1;
    @(posedge clk); #1;
    rst = 0; model = '0;
    for (int i = 0; i < 1000; i++) begin
      load = ($urandom_range(0, 3) == 0);
      d = 9'($urandom);
      @(posedge clk); #1;
      if (load) model = d;
      checks++;
      if (n !== model) begin failures++; $display("FAIL step %0d n=%0d exp=%0d", i, n, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
