// tb_dft_6nca_top: end-to-end test of the 6NCA test wrapper at its default
// parameters (19 primary inputs, 6 flip-flops with 4 in the scan chain, one
// observation point, 3x3 automaton).
//
// A small behavioural stand-in for the combinational logic of a sequential
// circuit under test closes the loop: it computes the next state of the 6
// flip-flops and one internal line (the observation point) from the primary
// inputs and the present state. A cycle-accurate reference model of the
// whole wrapper (automaton, input selection, partial scan chain) runs beside
// the design and every output is compared on every clock.
//
// Sequence: functional operation, a switch to test mode with a seed load,
// scan tests of shift / capture / shift-out with generator patterns on the
// primary inputs and the scan input, generator hold, and an external scan
// load in functional mode. Each mechanism is counted and must occur.
module tb_dft_6nca_top;

  localparam int NPI = 19, NFF = 6, NC = 9;
  localparam logic [NFF-1:0] MASK = 6'b00_1111;

  logic           clk = 1'b0;
  logic           rst_n, test_mode, se, tpg_en, tpg_load, scan_in;
  logic [NC-1:0]  tpg_seed, tpg_pattern;
  logic [NPI-1:0] func_pi, cut_pi;
  logic [NFF-1:0] cut_ns, cut_ps;
  logic [0:0]     obs_in, obs_out;
  logic           scan_out;

  int checks = 0, failures = 0;
  int n_func = 0, n_test = 0, n_shift = 0, n_capture = 0, n_load = 0;
  int n_step = 0, n_hold = 0, n_switch = 0, n_obs1 = 0, n_ext_scan = 0;

  dft_6nca_top dut (
    .clk(clk), .rst_n(rst_n), .test_mode(test_mode), .se(se),
    .tpg_en(tpg_en), .tpg_load(tpg_load), .tpg_seed(tpg_seed),
    .tpg_pattern(tpg_pattern), .func_pi(func_pi), .scan_in(scan_in),
    .cut_pi(cut_pi), .cut_ns(cut_ns), .cut_ps(cut_ps), .obs_in(obs_in),
    .scan_out(scan_out), .obs_out(obs_out));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- stand-in combinational logic of the circuit under test -------------
  function automatic logic [NFF-1:0] comb_ns(logic [NPI-1:0] pi, logic [NFF-1:0] ps);
    logic [NFF-1:0] ns;
    for (int k = 0; k < NFF; k++)
      ns[k] = (pi[k] & pi[k+6]) ^ pi[k+12] ^ (ps[k] & ~ps[(k+1) % NFF]) ^ pi[18];
    return ns;
  endfunction

  function automatic logic comb_obs(logic [NPI-1:0] pi, logic [NFF-1:0] ps);
    return (pi[0] & pi[9]) | (ps[5] & ps[4]);
  endfunction

  always_comb begin
    cut_ns    = comb_ns(cut_pi, cut_ps);
    obs_in[0] = comb_obs(cut_pi, cut_ps);
  end

  // ---- reference model -------------------------------------------------------
  // 6NCA dependencies per cell, row-major: self, top, left, bottom, right, bottom-right.
  bit dep [9][6] = '{
    '{1,1,0,1,0,1}, '{1,1,1,0,0,1}, '{1,1,0,0,1,0},
    '{1,0,1,1,0,1}, '{0,1,0,1,1,0}, '{1,0,0,1,0,1},
    '{1,1,0,0,1,0}, '{1,1,0,1,0,0}, '{1,1,1,0,0,0}
  };

  function automatic bit at(logic [8:0] s, int r, int c);
    if (r < 0 || r > 2 || c < 0 || c > 2) return 0;
    return s[r*3+c];
  endfunction

  function automatic logic [8:0] ca_step(logic [8:0] s);
    logic [8:0] n;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        bit v;
        int x;
        x = r*3 + c;
        v = 0;
        if (dep[x][0]) v ^= at(s, r,   c);
        if (dep[x][1]) v ^= at(s, r-1, c);
        if (dep[x][2]) v ^= at(s, r,   c-1);
        if (dep[x][3]) v ^= at(s, r+1, c);
        if (dep[x][4]) v ^= at(s, r,   c+1);
        if (dep[x][5]) v ^= at(s, r+1, c+1);
        n[x] = v;
      end
    return n;
  endfunction

  logic [8:0]     ca_m;
  logic [NFF-1:0] ff_m;

  function automatic logic [NPI-1:0] exp_pi();
    logic [NPI-1:0] p;
    for (int k = 0; k < NPI; k++) p[k] = test_mode ? ca_m[k % NC] : func_pi[k];
    return p;
  endfunction

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  // One clock: inputs are already applied; check combinational outputs,
  // advance the model, clock, check registered outputs.
  task automatic tick();
    logic [NPI-1:0] pi;
    logic [NFF-1:0] nx;
    logic           carry;
    logic [NFF-1:0] ns;
    #1;
    pi = exp_pi();
    chk(32'(cut_pi), 32'(pi), "cut_pi selection");
    chk(32'(obs_out), 32'(comb_obs(pi, ff_m)), "observation point");
    if (obs_out[0]) n_obs1++;
    if (test_mode) n_test++; else n_func++;
    if (se) n_shift++; else n_capture++;
    if (se && !test_mode) n_ext_scan++;
    if (tpg_load) n_load++;
    else if (tpg_en) n_step++;
    else n_hold++;
    // flip-flops
    carry = test_mode ? ca_m[NC-1] : scan_in;
    ns    = comb_ns(pi, ff_m);
    for (int k = 0; k < NFF; k++) begin
      nx[k] = (se && MASK[k]) ? carry : ns[k];
      if (MASK[k]) carry = ff_m[k];
    end
    ff_m = nx;
    if (tpg_load) ca_m = tpg_seed;
    else if (tpg_en) ca_m = ca_step(ca_m);
    @(posedge clk); #1;
    chk(32'(cut_ps), 32'(ff_m), "flip-flop state");
    chk(32'(tpg_pattern), 32'(ca_m), "generator state");
    chk(32'(scan_out), 32'(ff_m[3]), "scan_out");
    @(negedge clk);
  endtask

  initial begin
    rst_n = 0; test_mode = 0; se = 0; tpg_en = 0; tpg_load = 0;
    tpg_seed = '0; func_pi = '0; scan_in = 0;
    ca_m = 9'h001; ff_m = '0;
    #12;
    chk(32'(cut_ps), 0, "reset state");
    chk(32'(tpg_pattern), 32'h001, "reset seed");
    @(negedge clk) rst_n = 1;

    // 1. functional operation
    for (int n = 0; n < 60; n++) begin
      func_pi = NPI'($urandom);
      tick();
    end

    // 2. switch to test mode, load a seed
    test_mode = 1; n_switch++;
    tpg_load = 1; tpg_seed = 9'h0A5;
    tick();
    tpg_load = 0; tpg_en = 1;

    // 3. scan tests: 4 shift cycles, 1 capture cycle, repeated; the shift of
    //    the next test unloads the response of the previous one.
    for (int t = 0; t < 40; t++) begin
      se = 1;
      repeat (4) begin
        func_pi = NPI'($urandom);   // ignored in test mode
        tick();
      end
      se = 0;
      tick();
    end

    // 4. generator hold, then a fresh seed
    tpg_en = 0;
    repeat (5) tick();
    tpg_load = 1; tpg_seed = 9'h13C;
    tick();
    tpg_load = 0; tpg_en = 1;
    repeat (30) begin
      se = 1'($urandom);
      tick();
    end

    // 5. back to functional mode; load the chain from the external scan input
    test_mode = 0; n_switch++; tpg_en = 0;
    se = 1;
    for (int n = 0; n < 12; n++) begin
      scan_in = 1'($urandom);
      func_pi = NPI'($urandom);
      tick();
    end
    se = 0;
    repeat (20) begin
      func_pi = NPI'($urandom);
      tick();
    end

    $display("mechanisms: func=%0d test=%0d shift=%0d capture=%0d load=%0d step=%0d hold=%0d switch=%0d obs1=%0d ext_scan=%0d",
             n_func, n_test, n_shift, n_capture, n_load, n_step, n_hold, n_switch, n_obs1, n_ext_scan);
    checks++;
    if (n_func == 0 || n_test == 0 || n_shift == 0 || n_capture == 0 || n_load == 0 ||
        n_step == 0 || n_hold == 0 || n_switch < 2 || n_obs1 == 0 || n_ext_scan == 0) begin
      failures++;
      $display("FAIL: a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
