// Basic cell: one CLB with its configuration memory structure.
//
// The cell's 41-bit configuration memory (serial shift register plus two
// banks) sits under the CLB and supplies its configuration in parallel.
// The configuration shift path (sdi -> sdo) runs on cfg_clk; the CLB's
// MS-latch runs on clk, the cell's branch of the gated clock tree.
// Pairing the CLB with its memory follows the original design.
module basic_cell
  import fpga_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cfg_clk,
  input  logic            sdi,
  output logic            sdo,
  input  logic [1:0]      bank_en,
  input  logic            mem_sel,
  input  logic            mute,
  input  side_in_t [3:0]  in_side,
  output side_out_t [3:0] out_side,
  output logic [1:0]      fl_drv,
  output logic            fl_val,
  output logic            clk_req,
  output logic            fz,
  output logic            sz,
  output mode_e           mode
);

  cfg_t cfg;

  cfg_memory u_mem (
    .cfg_clk (cfg_clk), .rst_n (rst_n), .sdi (sdi), .sdo (sdo),
    .bank_en (bank_en), .mem_sel (mem_sel), .cfg (cfg)
  );

  clb u_clb (
    .clk (clk), .rst_n (rst_n), .cfg (cfg), .mute (mute),
    .in_side (in_side), .out_side (out_side),
    .fl_drv (fl_drv), .fl_val (fl_val), .clk_req (clk_req),
    .fz (fz), .sz (sz), .mode (mode)
  );

endmodule
