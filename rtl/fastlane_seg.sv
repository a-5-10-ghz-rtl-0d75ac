// One FastLANE segment: a shared bus connecting FL_SPAN (four) CLBs of a
// row or a column.
//
// Each attached cell may put its combinational result on the bus; the bus
// also takes an external input (used on the array's edge channels). The
// bus carries the OR of all enabled drivers; a correct configuration enables
// at most one. `conflict` flags more than one enabled driver.
// The shared four-cell bus follows the original design; its driver arrangement and
// resolution are this design's choices. Combinational.
module fastlane_seg #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] drv_en,
  input  logic [N-1:0] drv_val,
  input  logic         ext,
  output logic         bus,
  output logic         conflict
);

  always_comb begin
    int unsigned cnt;
    cnt = 0;
    for (int unsigned i = 0; i < N; i++) cnt += 32'(drv_en[i]);
    conflict = (cnt + 32'(ext)) > 1;
  end

  assign bus = ext | (|(drv_en & drv_val));

endmodule
