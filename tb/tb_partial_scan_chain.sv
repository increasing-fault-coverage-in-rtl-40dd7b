// tb_partial_scan_chain: self-checking test of the partial scan chain.
//
// Two instances are tested: the default (6 flip-flops, flip-flops 0-3 in the
// chain) and a full scan chain of 5 flip-flops. The reference model keeps the
// expected flip-flop values: with se high, scanned flip-flops shift (lowest
// index first in the chain) and unscanned ones capture d; with se low every
// flip-flop captures d. Checked on every clock: all q bits and scan_out, plus
// that a bit entering scan_in reaches scan_out after exactly the chain length.
module tb_partial_scan_chain;

  logic clk = 1'b0;
  logic rst_n, se, scan_in;
  int   checks = 0, failures = 0;
  int   n_shift = 0, n_capture = 0;

  localparam logic [5:0] MASK_A = 6'b00_1111;
  localparam logic [4:0] MASK_B = 5'b1_1111;

  logic [5:0] d_a, q_a, m_a;
  logic [4:0] d_b, q_b, m_b;
  logic       so_a, so_b;

  partial_scan_chain dut_a (.clk(clk), .rst_n(rst_n), .se(se), .scan_in(scan_in),
                            .d(d_a), .q(q_a), .scan_out(so_a));

  partial_scan_chain #(.N_FF(5), .SCAN_MASK(MASK_B)) dut_b (
    .clk(clk), .rst_n(rst_n), .se(se), .scan_in(scan_in),
    .d(d_b), .q(q_b), .scan_out(so_b));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [5:0] got, input logic [5:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  // Expected next state: chain order is ascending index among scanned bits.
  function automatic logic [5:0] model_next(logic [5:0] m, logic [5:0] mask, int n,
                                            logic [5:0] d, logic s, logic sin);
    logic [5:0] nx;
    logic       carry;
    carry = sin;
    for (int k = 0; k < n; k++) begin
      if (!s || !mask[k]) nx[k] = d[k];
      else begin
        nx[k] = carry;
      end
      if (mask[k]) carry = m[k];
    end
    for (int k = n; k < 6; k++) nx[k] = 0;
    return nx;
  endfunction

  initial begin
    logic [5:0] hist_in [$];
    rst_n = 0; se = 0; scan_in = 0; d_a = '1; d_b = '1;
    #12;
    check(q_a, 6'b0, "reset A");
    check({1'b0, q_b}, 6'b0, "reset B");
    m_a = 0; m_b = 0;
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      // long shift runs with occasional capture cycles
      se = (n % 11) != 10;
      scan_in = 1'($urandom);
      d_a = 6'($urandom);
      d_b = 5'($urandom);
      if (se) n_shift++; else n_capture++;
      m_a = model_next(m_a, MASK_A, 6, d_a, se, scan_in);
      m_b = model_next(m_b, {1'b0, MASK_B}, 5, {1'b0, d_b}, se, scan_in);
      @(posedge clk); #1;
      check(q_a, m_a, "partial chain state");
      check({1'b0, q_b}, m_b, "full chain state");
      check({5'b0, so_a}, {5'b0, m_a[3]}, "partial scan_out");
      check({5'b0, so_b}, {5'b0, m_b[4]}, "full scan_out");
      @(negedge clk);
    end
    // latency: a pattern shifted in appears at scan_out after the chain length
    se = 1;
    for (int n = 0; n < 12; n++) begin
      scan_in = n[0] ^ n[2];
      hist_in.push_back({5'b0, scan_in});
      @(posedge clk); #1;
      if (n >= 3) check({5'b0, so_a}, hist_in[n-3], "4-cycle chain latency");
      if (n >= 4) check({5'b0, so_b}, hist_in[n-4], "5-cycle chain latency");
      @(negedge clk);
    end
    checks++;
    if (n_shift == 0 || n_capture == 0) begin
      failures++;
      $display("FAIL: shift or capture never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
