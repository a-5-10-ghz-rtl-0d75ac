// System clock select: a 2:1 multiplexer choosing between the on-chip VCO
// and the external system clock. sel = 1 picks the external clock.
// The choice between the two sources follows the original design; the polarity of
// sel is this design's. The select is meant to be static while running.
module clk_select (
  input  logic vco_clk,
  input  logic ext_clk,
  input  logic sel,
  output logic clk
);

  always_comb begin
    if (sel) clk = ext_clk;
    else     clk = vco_clk;
  end

endmodule
