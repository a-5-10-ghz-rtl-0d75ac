// Configurable logic block (CLB) of the multiplexer-based FPGA.
//
// Datapath: a 2:1 core multiplexer computes FZ = X1 ? X2 : X3. X1 comes from
// the 16:1 input mux, X2 from the east 17:1 mux and X3 from the west 17:1
// mux; each may be complemented (differential signals make the complement
// free), so one 2:1 mux gives any two-input function, e.g.
//   INV A : X2 = X3 = ~A          AND : X1 = A, X2 = B, X3 = A
//   XOR   : X1 = A, X2 = ~B, X3 = B
// The MS-latch stores FZ on the cell clock and gives SZ and the feedback FD,
// which the 17:1 muxes may pick (hold / toggle circuits). FZ and SZ go to all
// four neighbours through output drivers; four 9:1 redirection muxes pass a
// neighbour's signal straight on to another neighbour (RN, RE, RS, RW).
// FZ may also drive the FastLANE on the cell's north and west sides.
//
// Power modes: every part can be switched off by its configuration (an
// all-zero configuration is a muted cell), and the array-wide master key
// mutes the cell whatever its configuration. Turned-off parts output 0.
// `clk_req` asks the clock tree for a clock when the MS-latch is in use.
// `mode` reports the operating mode of the loaded configuration.
//
// Timing: combinational from side inputs to outputs (three mux levels: input
// mux, core mux, no switch on the outputs); SZ/FD change on the rising edge
// of `clk`. The mux arrangement, the FD feedback and the redirection input
// sets follow the original design; which 17:1 mux feeds which core input, the polarity
// bits and the driver/FastLANE enables are this design's choices.
module clb
  import fpga_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  cfg_t           cfg,
  input  logic           mute,
  input  side_in_t [3:0] in_side,
  output side_out_t [3:0] out_side,
  output logic [1:0]     fl_drv,    // [1] FastLANE North, [0] FastLANE West
  output logic           fl_val,    // value driven on the FastLANE(s)
  output logic           clk_req,
  output logic           fz,
  output logic           sz,
  output mode_e          mode
);

  logic live;
  logic x1_raw, x2_raw, x3_raw, x1_on, x2_on, x3_on;
  logic x1, x2, x3;
  logic core_on, latch_on, fd;
  logic [3:0] rd, rd_on;

  assign live     = !mute;
  assign core_on  = live && cfg.core_on;
  assign latch_on = live && cfg.latch_on;

  input_mux #(.HAS_FD(1'b0)) u_mux_x1 (
    .side (in_side), .fd (1'b0), .code ({1'b0, cfg.sel_x1}), .en (core_on),
    .y (x1_raw), .on (x1_on)
  );
  input_mux #(.HAS_FD(1'b1)) u_mux_x2 (
    .side (in_side), .fd (fd), .code (cfg.sel_x2), .en (core_on),
    .y (x2_raw), .on (x2_on)
  );
  input_mux #(.HAS_FD(1'b1)) u_mux_x3 (
    .side (in_side), .fd (fd), .code (cfg.sel_x3), .en (core_on),
    .y (x3_raw), .on (x3_on)
  );

  assign x1 = x1_on & (x1_raw ^ cfg.inv[2]);
  assign x2 = x2_on & (x2_raw ^ cfg.inv[1]);
  assign x3 = x3_on & (x3_raw ^ cfg.inv[0]);

  assign fz = core_on & (x1 ? x2 : x3);

  ms_latch u_latch (
    .clk (clk), .rst_n (rst_n), .on (latch_on), .d (fz), .q (sz)
  );
  assign fd = sz;

  redir_mux #(.OWN(DIR_N)) u_rn (.side (in_side), .code (cfg.redir_n), .en (live), .y (rd[DIR_N]), .on (rd_on[DIR_N]));
  redir_mux #(.OWN(DIR_E)) u_re (.side (in_side), .code (cfg.redir_e), .en (live), .y (rd[DIR_E]), .on (rd_on[DIR_E]));
  redir_mux #(.OWN(DIR_S)) u_rs (.side (in_side), .code (cfg.redir_s), .en (live), .y (rd[DIR_S]), .on (rd_on[DIR_S]));
  redir_mux #(.OWN(DIR_W)) u_rw (.side (in_side), .code (cfg.redir_w), .en (live), .y (rd[DIR_W]), .on (rd_on[DIR_W]));

  always_comb begin
    for (int d = 0; d < 4; d++) begin
      out_side[d].fz = live && cfg.drv_en[d] && fz;
      out_side[d].sz = live && cfg.drv_en[d] && sz;
      out_side[d].rd = rd_on[d] && rd[d];
    end
  end

  assign fl_drv  = core_on ? cfg.fl_drv : 2'b00;
  assign fl_val  = fz;
  assign clk_req = latch_on;
  assign mode    = mute ? MODE_MUTE : cell_mode(cfg);

endmodule
