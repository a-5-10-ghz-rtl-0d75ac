// Master-slave latch of the CLB.
//
// Stores the core multiplexer's result on the rising edge of the cell clock
// and provides it as the sequential result SZ and as the feedback FD that
// the two 17:1 input muxes may select. The master/slave pair behaves as an
// edge-triggered flip-flop, which is how it is written here. When `on` is low
// the latch is unpowered: its output reads 0 and it takes no new data.
// Reset (active low, asynchronous) clears the stored bit; the original design does not
// describe a reset, it is added so that the state is defined.
module ms_latch (
  input  logic clk,
  input  logic rst_n,
  input  logic on,
  input  logic d,
  output logic q
);

  logic state = 1'b0;  // power-up value

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  state <= 1'b0;
    else if (on) state <= d;
  end

  assign q = on & state;

endmodule
