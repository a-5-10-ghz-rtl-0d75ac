// Behavioural model (not synthesizable logic): FPGA ring oscillator.
//
// STAGES cells, each configured as a buffer with one net crossed to give
// the inversion a ring needs, are closed into a loop; each stage adds the
// cell's gate delay STAGE_DELAY (in time units, 1 ps by default). The
// oscillation period is therefore 2 * STAGES * STAGE_DELAY, i.e. the
// frequency is 1 / (2 N T). With the measured 100 ps per cell a four-stage
// ring runs at an 800 ps period; the low-power variant has 250 ps per cell.
// `en` stands for the ring's power supply: with en low every node settles
// to 0 and the ring stops. `osc` is the last stage's output.
// The four stages and the delays follow the original design; modelling each stage as
// a pure delay is this model's simplification.
module ring_osc #(
  parameter int unsigned STAGES      = 4,
  parameter int unsigned STAGE_DELAY = 100
) (
  input  logic en,
  output logic osc
);

  logic [STAGES-1:0] node;

  assign #(STAGE_DELAY) node[0] = en & ~node[STAGES-1];
  for (genvar i = 1; i < STAGES; i++) begin : g_stage
    assign #(STAGE_DELAY) node[i] = en & node[i-1];
  end

  assign osc = node[STAGES-1];

endmodule
