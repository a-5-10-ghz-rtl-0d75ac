// Top level of the 20x20 FPGA chip.
//
// The system clock comes from the on-chip VCO or from the external clock
// pad, picked by a 2:1 clock multiplexer (clk_sel = 1: external). It feeds
// the gate array's H-pattern clock tree. The configuration port (serial data
// in/out, configuration clock, two bank enables, memory select) and the
// master key go to every cell; the array's edge signals and the external
// FastLANE inputs are the chip's user inputs and outputs. The VCO itself is
// analog and enters as the vco_clk port; pads are plain ports.
// The parts and their connection follow the original design; port names and the
// polarity of clk_sel are this design's choices.
// The four-ring-oscillator test chip (ro_testchip) is a separate circuit and
// stands beside the array with its own ports; its rings are delay-based
// behavioural models, so only the array part is synthesizable.
module fpga_top
  import fpga_pkg::*;
#(
  parameter int unsigned ROWS = 20,
  parameter int unsigned COLS = 20,
  localparam int unsigned HSEGS = (COLS + FL_SPAN - 1) / FL_SPAN,
  localparam int unsigned VSEGS = (ROWS + FL_SPAN - 1) / FL_SPAN,
  localparam int unsigned TBITS = $clog2((ROWS > COLS) ? ROWS : COLS),
  localparam int unsigned LEVELS = (2 * TBITS < 1) ? 1 : 2 * TBITS
) (
  input  logic                 vco_clk,
  input  logic                 ext_clk,
  input  logic                 clk_sel,
  input  logic                 rst_n,
  input  logic                 cfg_clk,
  input  logic                 cfg_sdi,
  output logic                 cfg_sdo,
  input  logic [1:0]           bank_en,
  input  logic                 mem_sel,
  input  logic                 master_key,
  input  side_out_t [COLS-1:0] ext_in_n,
  input  side_out_t [COLS-1:0] ext_in_s,
  input  side_out_t [ROWS-1:0] ext_in_e,
  input  side_out_t [ROWS-1:0] ext_in_w,
  output side_out_t [COLS-1:0] ext_out_n,
  output side_out_t [COLS-1:0] ext_out_s,
  output side_out_t [ROWS-1:0] ext_out_e,
  output side_out_t [ROWS-1:0] ext_out_w,
  input  logic [HSEGS-1:0]     fl_ext_s,
  input  logic [VSEGS-1:0]     fl_ext_e,
  output logic                 fl_conflict,
  output logic [2**LEVELS-1:0] clk_drv_on,
  // ring-oscillator test chip, side by side with the array
  input  logic                 ro_rst_n,
  input  logic                 ro_en_hs,
  input  logic                 ro_en_lp,
  output logic [3:0]           ro_out
);

  logic sys_clk;

  clk_select u_clk_sel (
    .vco_clk (vco_clk), .ext_clk (ext_clk), .sel (clk_sel), .clk (sys_clk)
  );

  fpga_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .clk        (sys_clk),
    .rst_n      (rst_n),
    .cfg_clk    (cfg_clk),
    .cfg_sdi    (cfg_sdi),
    .cfg_sdo    (cfg_sdo),
    .bank_en    (bank_en),
    .mem_sel    (mem_sel),
    .master_key (master_key),
    .ext_in_n   (ext_in_n),
    .ext_in_s   (ext_in_s),
    .ext_in_e   (ext_in_e),
    .ext_in_w   (ext_in_w),
    .ext_out_n  (ext_out_n),
    .ext_out_s  (ext_out_s),
    .ext_out_e  (ext_out_e),
    .ext_out_w  (ext_out_w),
    .fl_ext_s   (fl_ext_s),
    .fl_ext_e   (fl_ext_e),
    .fl_conflict(fl_conflict),
    .clk_drv_on (clk_drv_on)
  );

  logic [3:0] ro_osc_unused;

  ro_testchip u_ro_chip (
    .rst_n (ro_rst_n), .en_hs (ro_en_hs), .en_lp (ro_en_lp),
    .ro_osc (ro_osc_unused), .ro_out (ro_out)
  );

endmodule
