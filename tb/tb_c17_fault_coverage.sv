// tb_c17_fault_coverage: fault-coverage run of the 6NCA pattern generator on
// the ISCAS'85 benchmark c17.
//
// c17 has 5 primary inputs (N1 N2 N3 N6 N7), 2 outputs (N22 N23) and six
// 2-input NAND gates; its 11 lines with stuck-at-0 and stuck-at-1 give the
// 22 single stuck-at faults of the fault list used here. The testbench holds
// a behavioural copy of c17 that can force any one line to a constant, lets
// ca6n_tpg (default 3x3 rule matrix) run from seed 9'h053, applies cells
// 4..8 of each pattern to N1, N2, N3, N6, N7, and marks a fault detected
// when an output of the faulty copy differs from the fault-free one.
// Expected, worked out separately: all 22 faults are detected by the fifth
// pattern, i.e. 100 % fault coverage. The seed and the cell-to-input
// assignment are choices of this test.
module tb_c17_fault_coverage;

  logic       clk = 1'b0;
  logic       rst_n, en, load;
  logic [8:0] seed_in, pattern;
  int         checks = 0, failures = 0;

  ca6n_tpg dut (.clk(clk), .rst_n(rst_n), .en(en), .load(load),
                .seed_in(seed_in), .pattern(pattern));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NLINES  = 11;
  localparam int NFAULTS = 2 * NLINES;

  // Lines 0-4: N1 N2 N3 N6 N7; 5-10: N10 N11 N16 N19 N22 N23.
  // fault < 0: fault-free; otherwise line fault/2 stuck at fault%2.
  function automatic logic [1:0] c17(logic [4:0] in, int fault);
    logic [NLINES-1:0] v;
    for (int k = 0; k < 5; k++) v[k] = force_line(in[k], k, fault);
    v[5]  = force_line(~(v[0] & v[2]), 5,  fault);
    v[6]  = force_line(~(v[2] & v[3]), 6,  fault);
    v[7]  = force_line(~(v[1] & v[6]), 7,  fault);
    v[8]  = force_line(~(v[6] & v[4]), 8,  fault);
    v[9]  = force_line(~(v[5] & v[7]), 9,  fault);
    v[10] = force_line(~(v[7] & v[8]), 10, fault);
    return {v[10], v[9]};
  endfunction

  function automatic logic force_line(logic val, int line, int fault);
    if (fault >= 0 && fault / 2 == line) return logic'(fault % 2);
    return val;
  endfunction

  initial begin
    bit detected [NFAULTS];
    int n_detected, last_new;
    logic [4:0] in;
    en = 0; load = 0; seed_in = 9'h053; rst_n = 0;
    #12;
    @(negedge clk) rst_n = 1;
    load = 1;
    @(posedge clk); #1;
    load = 0; en = 1;
    n_detected = 0; last_new = -1;
    for (int p = 0; p < 32; p++) begin
      in = pattern[8:4];
      for (int f = 0; f < NFAULTS; f++)
        if (!detected[f] && c17(in, f) != c17(in, -1)) begin
          detected[f] = 1;
          n_detected++;
          last_new = p;
        end
      @(posedge clk); #1;
    end
    $display("c17: %0d of %0d faults detected, fault coverage %0d.%03d %%, last new detection at pattern %0d",
             n_detected, NFAULTS, n_detected * 100 / NFAULTS,
             (n_detected * 100000 / NFAULTS) % 1000, last_new);
    checks++;
    if (n_detected != NFAULTS) begin
      failures++;
      $display("FAIL: coverage below 100 %%");
      for (int f = 0; f < NFAULTS; f++)
        if (!detected[f]) $display("  undetected: line %0d stuck-at-%0d", f / 2, f % 2);
    end
    checks++;
    if (last_new != 4) begin
      failures++;
      $display("FAIL: expected the last new detection at pattern 4, got %0d", last_new);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
