// partial_scan_chain: state register of a sequential circuit under test with a
// partial multiplexer-based scan chain.
//
// The circuit keeps N_FF state flip-flops. Flip-flop k captures d[k], the
// next-state output of the circuit's combinational logic, and drives q[k] back
// into it. Each flip-flop whose bit is set in SCAN_MASK is replaced by a
// scan_register and linked into a single scan chain: the lowest selected index
// takes scan_in, every further selected flip-flop takes the q of the previous
// selected one, and the q of the highest selected one is scan_out. Flip-flops
// left out of the chain stay plain D flip-flops and keep capturing d[k] when se
// is high. SCAN_MASK all ones is the full scan chain; choosing a smaller set
// trades fault coverage against the multiplexers and routing of the chain.
//
// Timing: with se high, one bit moves one place along the chain per rising
// clock edge, so loading or unloading the chain takes SCAN_LEN cycles. With se
// low every flip-flop captures its d input (one capture cycle).
//
// Taking flip-flops out of the chain follows the partial-scan method this RTL
// implements; the default choice of which four of six flip-flops are scanned,
// the chain order (ascending index) and the reset are this design's choices.
module partial_scan_chain #(
  parameter int unsigned          N_FF      = 6,
  parameter logic [N_FF-1:0]      SCAN_MASK = 6'b00_1111
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            se,
  input  logic            scan_in,
  input  logic [N_FF-1:0] d,
  output logic [N_FF-1:0] q,
  output logic            scan_out
);

  // Number of flip-flops in the scan chain.
  localparam int unsigned SCAN_LEN = $countones(SCAN_MASK);

  initial begin
    assert (SCAN_LEN > 0) else $error("SCAN_MASK selects no flip-flop");
  end

  // Index of the nearest scanned flip-flop below k (-1: none, so the flip-flop
  // takes scan_in), and of the last scanned flip-flop, which drives scan_out.
  // SCAN_MASK is a constant, so the chain reduces to wires.
  function automatic int prev_scanned(input int k);
    for (int m = k - 1; m >= 0; m--)
      if (SCAN_MASK[m]) return m;
    return -1;
  endfunction

  localparam int LAST = prev_scanned(int'(N_FF));

  assign scan_out = q[LAST];

  for (genvar k = 0; k < N_FF; k++) begin : g_ff
    if (SCAN_MASK[k]) begin : g_scan
      localparam int PREV = prev_scanned(k);
      logic si;
      if (PREV < 0) begin : g_first
        assign si = scan_in;
      end else begin : g_next
        assign si = q[PREV];
      end
      scan_register u_sreg (
        .clk  (clk),
        .rst_n(rst_n),
        .se   (se),
        .di   (d[k]),
        .si   (si),
        .q    (q[k])
      );
    end else begin : g_plain
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) q[k] <= 1'b0;
        else        q[k] <= d[k];
      end
    end
  end

endmodule
