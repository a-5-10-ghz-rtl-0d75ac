// Ring-oscillator test chip: four FPGA ring oscillators, each followed by a
// divide-by-eight circuit that drives an output pad.
//   ro_out[0]  A: high-speed ring (HS_DELAY per cell)
//   ro_out[1]  B: high-speed ring with diodes on the current trees
//   ro_out[2]  C: low-power ring (LP_DELAY per cell)
//   ro_out[3]  D: low-power ring with diodes on the current trees
// The diodes only protect the transistors against breakdown and have no
// logic effect, so A/B and C/D are the same model. en_hs stands for the
// west (2.5 V) supply of the high-speed rings, en_lp for the east (2.0 V)
// supply of the low-power ones. The rings contain delay-based behavioural
// models. The ring count, the cell delays and the divide-by-eight follow the
// original design; which divider serves which ring is this design's choice.
module ro_testchip #(
  parameter int unsigned STAGES   = 4,
  parameter int unsigned HS_DELAY = 100,
  parameter int unsigned LP_DELAY = 250
) (
  input  logic       rst_n,
  input  logic       en_hs,
  input  logic       en_lp,
  output logic [3:0] ro_osc,
  output logic [3:0] ro_out
);

  for (genvar i = 0; i < 4; i++) begin : g_ro
    ring_osc #(.STAGES(STAGES), .STAGE_DELAY(i < 2 ? HS_DELAY : LP_DELAY)) u_ring (
      .en (i < 2 ? en_hs : en_lp), .osc (ro_osc[i])
    );
    freq_divider #(.DIV_LOG2(3)) u_div8 (
      .clk (ro_osc[i]), .rst_n (rst_n), .q (ro_out[i])
    );
  end

endmodule
