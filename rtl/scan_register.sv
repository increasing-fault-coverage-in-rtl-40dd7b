// scan_register: multiplexed-input scan flip-flop.
//
// A 2:1 multiplexer sits in front of a D flip-flop. With the select line se
// low the register is in data mode and captures di, the next-state value from
// the circuit's combinational logic; with se high it is in test mode and
// captures si, the scan input, so that chained registers form a shift register.
// q changes on the rising edge of clk, one cycle after the selected input is
// presented. The asynchronous active-low reset is an addition of this design,
// so that every flip-flop starts from a known value; the multiplexer and the
// meaning of the select line follow the scan register it models.
module scan_register (
  input  logic clk,
  input  logic rst_n,
  input  logic se,
  input  logic di,
  input  logic si,
  output logic q
);

  logic d_sel;

  always_comb d_sel = se ? si : di;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= d_sel;
  end

endmodule
