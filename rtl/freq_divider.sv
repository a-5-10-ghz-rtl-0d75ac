// Frequency divider by 2**DIV_LOG2 (divide-by-2 or divide-by-8 on the test
// chip), bringing an on-chip oscillation down to a rate the pads can carry.
// A DIV_LOG2-bit counter advances on every rising edge of clk; its top bit
// is the output, a square wave at clk / 2**DIV_LOG2. rst_n (asynchronous,
// active low) clears the counter. The division ratios follow the original design; the
// counter implementation is this design's choice.
module freq_divider #(
  parameter int unsigned DIV_LOG2 = 3
) (
  input  logic clk,
  input  logic rst_n,
  output logic q
);

  logic [DIV_LOG2-1:0] cnt = '0;  // power-up value

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;
  end

  assign q = cnt[DIV_LOG2-1];

endmodule
