// tb_ca6n_tpg: self-checking test of the 3x3 six-neighbourhood cellular
// automaton pattern generator with its default rule matrix.
//
// The reference model keeps the rules as a table of named dependencies
// (self, top, left, bottom, right, bottom-right per cell, rule matrix
// 53 57 50 / 45 22 37 / 50 52 56) and a null boundary, and steps a copy of
// the grid in parallel with the block. Checked: reset seed, one pattern per
// enabled clock, hold with en low, seed loading with priority over en, and
// that from seed 1 the sequence enters a cycle of 15 states after 2 steps.
module tb_ca6n_tpg;

  logic       clk = 1'b0;
  logic       rst_n, en, load;
  logic [8:0] seed_in, pattern;
  int         checks = 0, failures = 0;

  ca6n_tpg dut (.clk(clk), .rst_n(rst_n), .en(en), .load(load),
                .seed_in(seed_in), .pattern(pattern));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Dependencies per cell, row-major: self, top, left, bottom, right, bottom-right.
  bit dep [9][6] = '{
    '{1,1,0,1,0,1},   // 53
    '{1,1,1,0,0,1},   // 57
    '{1,1,0,0,1,0},   // 50
    '{1,0,1,1,0,1},   // 45
    '{0,1,0,1,1,0},   // 22
    '{1,0,0,1,0,1},   // 37
    '{1,1,0,0,1,0},   // 50
    '{1,1,0,1,0,0},   // 52
    '{1,1,1,0,0,0}    // 56
  };

  function automatic bit grid(bit g [3][3], int r, int c);
    if (r < 0 || r > 2 || c < 0 || c > 2) return 0;
    return g[r][c];
  endfunction

  function automatic logic [8:0] ref_step(logic [8:0] s);
    bit g [3][3];
    logic [8:0] n;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        g[r][c] = s[r*3+c];
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        bit v;
        v = 0;
        if (dep[r*3+c][0]) v ^= grid(g, r,   c);
        if (dep[r*3+c][1]) v ^= grid(g, r-1, c);
        if (dep[r*3+c][2]) v ^= grid(g, r,   c-1);
        if (dep[r*3+c][3]) v ^= grid(g, r+1, c);
        if (dep[r*3+c][4]) v ^= grid(g, r,   c+1);
        if (dep[r*3+c][5]) v ^= grid(g, r+1, c+1);
        n[r*3+c] = v;
      end
    return n;
  endfunction

  task automatic check(input logic [8:0] got, input logic [8:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %03h expected %03h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    logic [8:0] model;
    logic [8:0] hist [0:40];
    en = 0; load = 0; seed_in = '0; rst_n = 0;
    #12;
    check(pattern, 9'h001, "reset seed");
    @(negedge clk) rst_n = 1;
    model = 9'h001;
    // free run from the reset seed: one new pattern per clock
    en = 1;
    hist[0] = pattern;
    for (int n = 1; n <= 40; n++) begin
      @(posedge clk); #1;
      model = ref_step(model);
      check(pattern, model, "step from reset seed");
      hist[n] = pattern;
      @(negedge clk);
    end
    // hand-worked first step: only cell (0,0)=1; it feeds (0,0) via self,
    // (0,1) via left (rule 57), (1,0) via top (rule 45 has none -> 0).
    check(hist[1], 9'b000_000_011, "first step by hand");
    // cycle of 15 after a tail of 2
    check(hist[17], hist[2], "period 15");
    checks++;
    for (int p = 1; p < 15; p++)
      if (hist[2+p] == hist[2]) begin
        failures++;
        $display("FAIL period shorter than 15 (%0d)", p);
      end
    // hold
    en = 0;
    repeat (3) @(posedge clk);
    #1 check(pattern, model, "hold with en low");
    // load has priority over en; then random seeds
    for (int t = 0; t < 30; t++) begin
      @(negedge clk);
      seed_in = 9'($urandom);
      load = 1; en = 1;
      @(posedge clk); #1;
      check(pattern, seed_in, "load seed");
      model = seed_in;
      @(negedge clk);
      load = 0;
      for (int n = 0; n < 8; n++) begin
        @(posedge clk); #1;
        model = ref_step(model);
        check(pattern, model, "step from loaded seed");
        @(negedge clk);
      end
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
