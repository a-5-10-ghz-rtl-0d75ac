// H-pattern clock distribution with per-driver enables.
//
// The clock reaches 2**LEVELS leaves (cells) through a binary tree of
// LEVELS driver levels; level 1 drivers each serve two leaves, the root
// (level LEVELS) is fed by the clock source. A leaf requests the clock when
// its MS-latch is in use. Each driver is enabled when any leaf below it
// requests, so a request turns on every driver on the path to the source and
// all other drivers stay off. Every leaf sees the same number of driver
// stages, so the tree adds no skew between used cells.
//
// Nodes are numbered as a heap: root = 1, children of n are 2n and 2n+1,
// leaves are nodes 2**LEVELS .. 2**(LEVELS+1)-1. drv_on[n] shows driver n's
// enable. A leaf's clock is its level-1 driver's output. Enables come from
// configuration and are static while the clock runs.
// The enable voting follows the original design; the heap numbering is this design's.
module clock_htree #(
  parameter int unsigned LEVELS = 10,
  localparam int unsigned NLEAF = 2 ** LEVELS
) (
  input  logic             clk,
  input  logic [NLEAF-1:0] req,
  output logic [NLEAF-1:0] gclk,
  output logic [NLEAF-1:0] drv_on   // bit n = driver n (bit 0 unused)
);

  logic [2*NLEAF-1:1] en;    // request below each node
  logic [NLEAF-1:0]   nclk;  // output clock of each driver

  assign en[2*NLEAF-1:NLEAF] = req;

  for (genvar n = NLEAF - 1; n >= 1; n--) begin : g_node
    assign en[n] = en[2*n] | en[2*n+1];
    if (n == 1) begin : g_root
      assign nclk[n] = clk & en[n];
    end else begin : g_inner
      assign nclk[n] = nclk[n/2] & en[n];
    end
  end
  assign nclk[0] = 1'b0;

  for (genvar i = 0; i < NLEAF; i++) begin : g_leaf
    assign gclk[i] = nclk[(NLEAF + i) / 2];
  end

  assign drv_on = {en[NLEAF-1:1], 1'b0};

endmodule
