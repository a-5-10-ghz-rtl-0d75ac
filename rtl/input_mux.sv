// Two-level input multiplexer of the CLB (16:1, or 17:1 with the feedback).
//
// First level: one 4:1 mux per side (N, E, S, W), each choosing among that
// side's FZ, SZ, redirection and FastLANE signal. Second level: a 4:1 mux
// choosing among the four sides, or a 5:1 mux whose fifth input is the
// MS-latch feedback FD when HAS_FD is set. Only the first-level mux on the
// selected side is turned on; the others are switched off to save power.
//
// Code (5 bits): with HAS_FD, 0 = off, 1..16 = side input code-1, 17 = FD.
// Without HAS_FD, code[3:0] is the side input and `en` gates the mux.
// Side input index = side*4 + member (member FZ, SZ, RD, FL).
// The two-level split follows the published drawing of the 16:1 mux; the code
// format is this design's own. Combinational.
module input_mux
  import fpga_pkg::*;
#(
  parameter bit HAS_FD = 1'b1
) (
  input  side_in_t [3:0] side,
  input  logic           fd,
  input  logic [4:0]     code,
  input  logic           en,
  output logic           y,
  output logic           on
);

  localparam int unsigned N2 = HAS_FD ? 5 : 4;

  logic       active;     // a side input is selected
  logic [3:0] idx;        // side input index
  logic [2:0] code2;      // second-level select
  logic [3:0] lvl1_y, lvl1_on;
  logic [N2-1:0] lvl2_d;

  always_comb begin
    if (HAS_FD) begin
      active = en && code >= 5'd1 && code <= 5'd16;
      idx    = 4'(code - 5'd1);
      code2  = (en && code == SEL17_FD) ? 3'd4 : {1'b0, idx[3:2]};
    end else begin
      active = en;
      idx    = code[3:0];
      code2  = {1'b0, idx[3:2]};
    end
  end

  for (genvar s = 0; s < 4; s++) begin : g_lvl1
    sel_mux #(.N(4), .BASE(0), .W(2)) u_mux (
      .code (idx[1:0]),
      .en   (active && idx[3:2] == 2'(s)),
      .d    (side[s]),
      .y    (lvl1_y[s]),
      .on   (lvl1_on[s])
    );
  end

  always_comb begin
    lvl2_d[3:0] = lvl1_y;
    if (HAS_FD) lvl2_d[N2-1] = fd;
  end

  logic on2;

  sel_mux #(.N(N2), .BASE(0), .W(3)) u_lvl2 (
    .code (code2),
    .en   (active || (HAS_FD && en && code == SEL17_FD)),
    .d    (lvl2_d),
    .y    (y),
    .on   (on2)
  );

  // the path is on when the second level is on and, for a side input, the
  // first-level mux of that side is on too
  assign on = on2 && (code2 == 3'd4 || (|lvl1_on));

endmodule
