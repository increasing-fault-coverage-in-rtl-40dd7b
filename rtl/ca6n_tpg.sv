// ca6n_tpg: test pattern generator built as a hybrid two-dimensional cellular
// automaton with a six-cell neighbourhood (6NCA).
//
// ROWS x COLS one-bit cells are arranged in a grid; cell (i,j) is bit
// i*COLS+j of pattern. On every clock with en high, each cell takes
//   m(i,j) <= XOR of the neighbours selected by its rule among
//             self m(i,j), top m(i-1,j), left m(i,j-1), bottom m(i+1,j),
//             right m(i,j+1) and bottom-right m(i+1,j+1),
// with the rule bits ordered [self,top,left,bottom,right,bottom-right] from
// MSB to LSB (see dft_pkg). Rules differ from cell to cell (a hybrid CA) and
// are given by the RULES parameter, whose default is the 3x3 rule matrix
//   53 57 50 / 45 22 37 / 50 52 56.
// A neighbour outside the grid reads as constant 0 (null boundary).
//
// Interface: load (priority over en) copies seed_in into the cells; reset
// loads SEED. pattern is the registered cell state, so a new pattern appears
// one clock after each enabled edge, one pattern per clock.
//
// The neighbourhood, the XOR next-state function, the rule encoding and the
// default rule matrix follow the design this RTL implements. The null
// boundary, the seed, the load port and the enable are this design's choices.
// With the default rules the automaton is linear but not of maximal length:
// from most seeds it enters a cycle of 15 states.
module ca6n_tpg
  import dft_pkg::*;
#(
  parameter int unsigned                    ROWS  = 3,
  parameter int unsigned                    COLS  = 3,
  parameter ca_rule_t [ROWS*COLS-1:0]       RULES = RULES_3X3,
  parameter logic [ROWS*COLS-1:0]           SEED  = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 load,
  input  logic [ROWS*COLS-1:0] seed_in,
  output logic [ROWS*COLS-1:0] pattern
);

  localparam int unsigned N = ROWS * COLS;

  logic [N-1:0] state_q, state_d;

  // Cell value with the null boundary applied.
  function automatic logic cell_at(input logic [N-1:0] s, input int i, input int j);
    if (i < 0 || j < 0 || i >= int'(ROWS) || j >= int'(COLS)) return 1'b0;
    return s[i*int'(COLS) + j];
  endfunction

  always_comb begin
    for (int i = 0; i < int'(ROWS); i++) begin
      for (int j = 0; j < int'(COLS); j++) begin
        ca_rule_t r;
        r = RULES[i*int'(COLS) + j];
        state_d[i*int'(COLS) + j] =
            (r[RULE_SELF]   & cell_at(state_q, i,   j  )) ^
            (r[RULE_TOP]    & cell_at(state_q, i-1, j  )) ^
            (r[RULE_LEFT]   & cell_at(state_q, i,   j-1)) ^
            (r[RULE_BOTTOM] & cell_at(state_q, i+1, j  )) ^
            (r[RULE_RIGHT]  & cell_at(state_q, i,   j+1)) ^
            (r[RULE_BRIGHT] & cell_at(state_q, i+1, j+1));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state_q <= SEED;
    else if (load) state_q <= seed_in;
    else if (en)   state_q <= state_d;
  end

  assign pattern = state_q;

endmodule
