// tb_ovsf_code_generator: end-to-end test of the OVSF code generator at
// its default size (9 stages, SF = 4 to 512).
//
// For every spreading factor SF = 4, 8, ..., 512 and every code ID N < SF
// the generator is loaded and clocked through one full code period plus
// one chip.  Each chip is compared with a reference built independently
// from the recursive definition of the OVSF tree (C(2S,2i) = C(S,i)C(S,i),
// C(2S,2i+1) = C(S,i) followed by the inverse of C(S,i), with C(1,0) the
// single chip -1, written as 0).  Clock pulses are separated by random
// idle cycles, during which the chip must not change.  It also checks:
//   - the codes C(4,*) and C(8,*) against the printed code tree values;
//   - that all codes of one SF level are mutually orthogonal;
//   - one chip per clock pulse: the code repeats after exactly SF pulses;
//   - that an SF register of 0 (SF = 1 or 2) keeps the counter idle;
//   - that reloading SF or N in the middle of a code restarts it at chip 0.
// Each of these mechanisms is counted and must occur at least once.
module tb_ovsf_code_generator;
  localparam int STAGES = 9;
  int checks = 0, failures = 0;
  int n_sf_switch = 0, n_id_load = 0, n_wrap = 0, n_idle = 0, n_sf_idle = 0, n_restart = 0;
  logic clk = 0, rst, ck, sf_load, id_load;
  logic [STAGES:0]   sf_in;
  logic [STAGES-1:0] id_in, b;
  logic              code;

  ovsf_code_generator dut (
    .clk(clk), .rst(rst), .ck(ck),
    .sf_load(sf_load), .sf_in(sf_in),
    .id_load(id_load), .id_in(id_in),
    .b(b), .code(code)
  );

  always #5 clk = ~clk;

  // Chip t of C(sf, id) from the recursive tree construction.
  function automatic logic ref_chip(int sf, int id, int t);
    if (sf == 1) return 1'b0;
    if (t >= sf / 2) return ref_chip(sf / 2, id >> 1, t - sf / 2) ^ 1'(id & 1);
    return ref_chip(sf / 2, id >> 1, t);
  endfunction

  // Code tree values for SF = 4 and SF = 8 (+1 -> 1, -1 -> 0), first chip
  // leftmost.
  localparam logic [3:0] TREE4 [4] = '{4'b0000, 4'b0011, 4'b0101, 4'b0110};
  localparam logic [7:0] TREE8 [8] = '{
    8'b0000_0000, 8'b0000_1111, 8'b0011_0011, 8'b0011_1100,
    8'b0101_0101, 8'b0101_1010, 8'b0110_0110, 8'b0110_1001
  };

  logic [511:0] captured [512];   // chips of every code of the current SF

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  task automatic load_sf(int sf);
    sf_in = (STAGES+1)'(sf); sf_load = 1;
    @(posedge clk); #1;
    sf_load = 0;
  endtask

  task automatic load_id(int id);
    id_in = STAGES'(id); id_load = 1;
    @(posedge clk); #1;
    id_load = 0;
    n_id_load++;
  endtask

  // One clock pulse, optionally preceded by an idle cycle.
  task automatic step();
    logic prev_code;
    if ($urandom_range(0, 15) == 0) begin
      prev_code = code;
      ck = 0;
      @(posedge clk); #1;
      n_idle++;
      checks++;
      if (code !== prev_code) fail("chip changed without a clock pulse");
    end
    ck = 1;
    @(posedge clk); #1;
    ck = 0;
  endtask

  task automatic check_chip(int sf, int id, int t);
    logic exp;
    exp = ref_chip(sf, id, t % sf);
    checks++;
    if (code !== exp) fail($sformatf("C(%0d,%0d) chip %0d: got %b expected %b", sf, id, t, code, exp));
  endtask

  initial begin
    int sf, corr, prev_sf;
    rst = 1; ck = 0; sf_load = 0; id_load = 0; sf_in = '0; id_in = '0;
    repeat (2) @(posedge clk);
    #1;
    rst = 0;

    // SF register 0 (SF = 1 or 2): the counter never moves.
    load_id(9'h1ff);
    ck = 1;
    repeat (20) @(posedge clk);
    #1;
    ck = 0;
    checks++;
    if (b !== '0 || code !== 1'b0) fail("counter or code moved with SF register 0");
    else n_sf_idle++;

    prev_sf = 0;
    for (int m = 2; m <= STAGES; m++) begin
      sf = 1 << m;
      load_sf(sf);
      if (sf != prev_sf) n_sf_switch++;
      prev_sf = sf;
      for (int id = 0; id < sf; id++) begin
        load_id(id);
        captured[id] = '0;
        for (int t = 0; t <= sf; t++) begin
          check_chip(sf, id, t);
          if (t < sf) captured[id][t] = code;
          if (t == sf) begin
            // Full period elapsed: the counter is back at 0.
            checks++;
            if (b !== '0) fail($sformatf("SF=%0d counter not back at 0 after %0d pulses: %b", sf, sf, b));
            else n_wrap++;
          end
          if (t < sf) step();
        end
      end
      // Printed code tree values.
      if (sf == 4) for (int id = 0; id < 4; id++) begin
        checks++;
        if ({<<{captured[id][3:0]}} !== TREE4[id]) fail($sformatf("C(4,%0d) differs from the tree", id));
      end
      if (sf == 8) for (int id = 0; id < 8; id++) begin
        checks++;
        if ({<<{captured[id][7:0]}} !== TREE8[id]) fail($sformatf("C(8,%0d) differs from the tree", id));
      end
      // Orthogonality of all codes of this level (sampled pairs above SF = 64).
      for (int i = 0; i < sf; i++) begin
        for (int j = i + 1; j < sf; j++) begin
          if (sf > 64 && $urandom_range(0, sf / 16) != 0) continue;
          corr = 0;
          for (int t = 0; t < sf; t++) corr += (captured[i][t] == captured[j][t]) ? 1 : -1;
          checks++;
          if (corr != 0) fail($sformatf("C(%0d,%0d) and C(%0d,%0d) not orthogonal: %0d", sf, i, sf, j, corr));
        end
      end
    end

    // Reloading SF mid-code restarts the code at chip 0.
    load_sf(16);
    load_id(11);
    repeat (5) step();
    check_chip(16, 11, 5);
    load_sf(32);
    n_sf_switch++;
    checks++;
    if (b !== '0) fail("SF reload did not restart the counter");
    else n_restart++;
    for (int t = 0; t < 32; t++) begin
      check_chip(32, 11, t);
      step();
    end

    // Reloading the code ID mid-code also restarts at chip 0.
    repeat (7) step();
    check_chip(32, 11, 7);
    load_id(21);
    checks++;
    if (b !== '0) fail("code ID reload did not restart the counter");
    else n_restart++;
    for (int t = 0; t < 32; t++) begin
      check_chip(32, 21, t);
      step();
    end

    $display("mechanisms: sf_switch=%0d id_load=%0d wrap=%0d idle=%0d sf_idle=%0d restart=%0d",
             n_sf_switch, n_id_load, n_wrap, n_idle, n_sf_idle, n_restart);
    checks++; if (n_sf_switch == 0) fail("no SF switch");
    checks++; if (n_id_load == 0)   fail("no code ID load");
    checks++; if (n_wrap == 0)      fail("no counter wrap");
    checks++; if (n_idle == 0)      fail("no idle cycle");
    checks++; if (n_sf_idle == 0)   fail("no SF = 1/2 idle check");
    checks++; if (n_restart < 2)    fail("mid-code restarts not both seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
