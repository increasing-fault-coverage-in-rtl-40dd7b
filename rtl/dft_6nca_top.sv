// dft_6nca_top: test wrapper for a sequential circuit under test with a 6NCA
// pattern generator, a partial scan chain and observation points.
//
// The circuit under test is split, as usual for scan design, into its
// combinational logic (outside this module, connected through ports) and its
// N_FF state flip-flops (inside, in partial_scan_chain). The wrapper adds:
//   * ca6n_tpg, a 3x3 hybrid six-neighbourhood cellular automaton that
//     produces one ROWS*COLS-bit pseudo-random pattern per clock;
//   * input selection: with test_mode high the combinational logic's primary
//     inputs cut_pi are driven from the automaton (input k takes cell
//     k mod ROWS*COLS) and the scan chain's serial input takes the last cell;
//     with test_mode low cut_pi = func_pi and the scan input is scan_in;
//   * a partial scan chain: the flip-flops selected by SCAN_MASK are scan
//     registers shifting on se, the others plain D flip-flops;
//   * observation points: N_OBS internal lines of the combinational logic,
//     chosen where many undetected faults cluster in one fan-in cone, come in
//     on obs_in and leave as extra outputs obs_out.
//
// Timing: everything is clocked on the rising edge of clk. The automaton steps
// on each edge with tpg_en high (tpg_load loads tpg_seed instead). A scan
// test is SCAN_LEN shift cycles with se high, then one capture cycle with se
// low, then SCAN_LEN shift cycles to unload through scan_out while the next
// pattern is shifted in. The circuit's primary outputs are taken directly
// from its combinational logic, as are the observation lines.
//
// The defaults follow the s510 row of the hybrid (partial scan + observation
// point) experiment: 19 primary inputs, 6 flip-flops of which 4 are in the
// chain, 1 observation point. Which flip-flops are scanned, the mapping of
// automaton cells onto primary inputs and the scan input, and test_mode are
// this design's choices.
module dft_6nca_top
  import dft_pkg::*;
#(
  parameter int unsigned              ROWS      = 3,
  parameter int unsigned              COLS      = 3,
  parameter ca_rule_t [ROWS*COLS-1:0] RULES     = RULES_3X3,
  parameter logic [ROWS*COLS-1:0]     SEED      = 1,
  parameter int unsigned              N_PI      = 19,
  parameter int unsigned              N_FF      = 6,
  parameter logic [N_FF-1:0]          SCAN_MASK = 6'b00_1111,
  parameter int unsigned              N_OBS     = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // mode control
  input  logic                 test_mode,
  input  logic                 se,
  // pattern generator control
  input  logic                 tpg_en,
  input  logic                 tpg_load,
  input  logic [ROWS*COLS-1:0] tpg_seed,
  output logic [ROWS*COLS-1:0] tpg_pattern,
  // functional inputs and external scan input
  input  logic [N_PI-1:0]      func_pi,
  input  logic                 scan_in,
  // to / from the combinational logic of the circuit under test
  output logic [N_PI-1:0]      cut_pi,
  input  logic [N_FF-1:0]      cut_ns,
  output logic [N_FF-1:0]      cut_ps,
  input  logic [N_OBS-1:0]     obs_in,
  // test outputs
  output logic                 scan_out,
  output logic [N_OBS-1:0]     obs_out
);

  localparam int unsigned NCELL = ROWS * COLS;

  logic [NCELL-1:0] pattern;
  logic             chain_si;

  ca6n_tpg #(
    .ROWS (ROWS),
    .COLS (COLS),
    .RULES(RULES),
    .SEED (SEED)
  ) u_tpg (
    .clk    (clk),
    .rst_n  (rst_n),
    .en     (tpg_en),
    .load   (tpg_load),
    .seed_in(tpg_seed),
    .pattern(pattern)
  );

  always_comb begin
    for (int k = 0; k < int'(N_PI); k++)
      cut_pi[k] = test_mode ? pattern[k % int'(NCELL)] : func_pi[k];
    chain_si = test_mode ? pattern[NCELL-1] : scan_in;
  end

  partial_scan_chain #(
    .N_FF     (N_FF),
    .SCAN_MASK(SCAN_MASK)
  ) u_chain (
    .clk     (clk),
    .rst_n   (rst_n),
    .se      (se),
    .scan_in (chain_si),
    .d       (cut_ns),
    .q       (cut_ps),
    .scan_out(scan_out)
  );

  assign obs_out     = obs_in;
  assign tpg_pattern = pattern;

endmodule
