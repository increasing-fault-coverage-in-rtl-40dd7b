// dft_pkg: types and constants shared by the scan and pattern-generator blocks.
//
// A six-neighbourhood cellular automaton (6NCA) cell is configured by a 6-bit
// rule. Reading the rule as a binary number, its bits from the most to the least
// significant mark whether the cell's next state depends on
//   [self, top, left, bottom, right, bottom-right]
// and the next state is the XOR (sum modulo 2) of the neighbours that are
// marked. Rule 53 = 6'b110101 thus uses self, top, bottom and bottom-right.
// The bit order and the 3x3 rule matrix below are those of the design this
// RTL follows; everything else in the package is naming.
package dft_pkg;

  typedef logic [5:0] ca_rule_t;

  // Bit position of each neighbour inside a rule.
  localparam int unsigned RULE_SELF   = 5;
  localparam int unsigned RULE_TOP    = 4;
  localparam int unsigned RULE_LEFT   = 3;
  localparam int unsigned RULE_BOTTOM = 2;
  localparam int unsigned RULE_RIGHT  = 1;
  localparam int unsigned RULE_BRIGHT = 0;

  // Hybrid 3x3 rule matrix, element [i*3+j] is the rule of cell (row i, column j):
  //   53 57 50
  //   45 22 37
  //   50 52 56
  localparam ca_rule_t [8:0] RULES_3X3 = {
    6'd56, 6'd52, 6'd50,
    6'd37, 6'd22, 6'd45,
    6'd50, 6'd57, 6'd53
  };

endpackage
