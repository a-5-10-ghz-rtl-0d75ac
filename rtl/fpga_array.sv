// ROWS x COLS gate array of basic cells.
//
// Wiring:
//  * Nearest neighbour: each cell receives, on each side, the neighbour's
//    FZ, SZ and the redirection signal the neighbour sends toward it; cells
//    on the edge get these from the ext_in_* ports and send theirs out on
//    ext_out_*.
//  * FastLANE: horizontal channels run between rows (ROWS+1 of them) and
//    vertical channels between columns (COLS+1), each cut into segments
//    spanning FL_SPAN cells. A cell sees the segments on its four sides and
//    may drive the segment on its north side (horizontal) and on its west
//    side (vertical). The south-most and east-most channels, which no cell
//    drives, take external inputs fl_ext_s / fl_ext_e.
//  * Configuration: all cells' shift registers form one serial chain that
//    snakes through the rows (row 0 left to right, row 1 right to left, ...)
//    from cfg_sdi to cfg_sdo. bank_en, mem_sel and cfg_clk go to every cell.
//    Loading the array takes CFG_BITS*ROWS*COLS cfg_clk cycles.
//  * Clock: an H-pattern tree of gated drivers carries clk to the cells;
//    only drivers with a cell below that uses its MS-latch are on.
//  * master_key high mutes every cell (whole array off).
//
// The signal paths between cells are combinational and pass through cells'
// multiplexers, so the netlist is full of structural loops (Verilator reports
// them as UNOPTFLAT). They are inherent to a routing fabric: a configuration
// closes at most the loops the user asks for, and ring oscillators are built
// that way on purpose.
// The neighbour wiring, the four-cell FastLANE, the serial chain and the
// gated clock tree follow the original design; the channel placement, the snake order
// of the chain and the edge ports are this design's choices.
module fpga_array
  import fpga_pkg::*;
#(
  parameter int unsigned ROWS = 20,
  parameter int unsigned COLS = 20,
  localparam int unsigned HSEGS = (COLS + FL_SPAN - 1) / FL_SPAN,
  localparam int unsigned VSEGS = (ROWS + FL_SPAN - 1) / FL_SPAN,
  localparam int unsigned TBITS = $clog2((ROWS > COLS) ? ROWS : COLS),
  localparam int unsigned LEVELS = (2 * TBITS < 1) ? 1 : 2 * TBITS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   cfg_clk,
  input  logic                   cfg_sdi,
  output logic                   cfg_sdo,
  input  logic [1:0]             bank_en,
  input  logic                   mem_sel,
  input  logic                   master_key,
  input  side_out_t [COLS-1:0]   ext_in_n,
  input  side_out_t [COLS-1:0]   ext_in_s,
  input  side_out_t [ROWS-1:0]   ext_in_e,
  input  side_out_t [ROWS-1:0]   ext_in_w,
  output side_out_t [COLS-1:0]   ext_out_n,
  output side_out_t [COLS-1:0]   ext_out_s,
  output side_out_t [ROWS-1:0]   ext_out_e,
  output side_out_t [ROWS-1:0]   ext_out_w,
  input  logic [HSEGS-1:0]       fl_ext_s,
  input  logic [VSEGS-1:0]       fl_ext_e,
  output logic                   fl_conflict,
  output logic [2**LEVELS-1:0]   clk_drv_on
);

  localparam int unsigned NLEAF = 2 ** LEVELS;

  side_out_t [3:0] cell_out [ROWS][COLS];
  side_in_t  [3:0] cell_in  [ROWS][COLS];
  logic [1:0]      fl_drv   [ROWS][COLS];
  logic            fl_val   [ROWS][COLS];
  logic            clk_req  [ROWS][COLS];
  logic            hfl [ROWS+1][HSEGS];
  logic            vfl [COLS+1][VSEGS];
  logic            hconf [ROWS+1][HSEGS];
  logic            vconf [COLS+1][VSEGS];
  logic [ROWS*COLS:0] chain;
  logic [NLEAF-1:0]   tree_req, tree_clk;

  // ---------------- cells ----------------
  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned POS = r * COLS + ((r % 2 == 0) ? c : COLS - 1 - c);
      localparam int unsigned LEAF = htree_leaf(r, c, TBITS);

      // inputs from the four sides
      if (r == 0) begin : g_n_edge
        assign cell_in[r][c][DIR_N] = {hfl[r][c/FL_SPAN], ext_in_n[c].rd, ext_in_n[c].sz, ext_in_n[c].fz};
      end else begin : g_n_cell
        assign cell_in[r][c][DIR_N] = {hfl[r][c/FL_SPAN], cell_out[r-1][c][DIR_S]};
      end
      if (r == ROWS - 1) begin : g_s_edge
        assign cell_in[r][c][DIR_S] = {hfl[r+1][c/FL_SPAN], ext_in_s[c]};
      end else begin : g_s_cell
        assign cell_in[r][c][DIR_S] = {hfl[r+1][c/FL_SPAN], cell_out[r+1][c][DIR_N]};
      end
      if (c == COLS - 1) begin : g_e_edge
        assign cell_in[r][c][DIR_E] = {vfl[c+1][r/FL_SPAN], ext_in_e[r]};
      end else begin : g_e_cell
        assign cell_in[r][c][DIR_E] = {vfl[c+1][r/FL_SPAN], cell_out[r][c+1][DIR_W]};
      end
      if (c == 0) begin : g_w_edge
        assign cell_in[r][c][DIR_W] = {vfl[c][r/FL_SPAN], ext_in_w[r]};
      end else begin : g_w_cell
        assign cell_in[r][c][DIR_W] = {vfl[c][r/FL_SPAN], cell_out[r][c-1][DIR_E]};
      end

      logic fz_unused, sz_unused;
      mode_e mode_unused;

      basic_cell u_cell (
        .clk      (tree_clk[LEAF]),
        .rst_n    (rst_n),
        .cfg_clk  (cfg_clk),
        .sdi      (chain[POS]),
        .sdo      (chain[POS+1]),
        .bank_en  (bank_en),
        .mem_sel  (mem_sel),
        .mute     (master_key),
        .in_side  (cell_in[r][c]),
        .out_side (cell_out[r][c]),
        .fl_drv   (fl_drv[r][c]),
        .fl_val   (fl_val[r][c]),
        .clk_req  (clk_req[r][c]),
        .fz       (fz_unused),
        .sz       (sz_unused),
        .mode     (mode_unused)
      );
    end
  end

  // ---------------- edge outputs ----------------
  for (genvar c = 0; c < COLS; c++) begin : g_out_ns
    assign ext_out_n[c] = cell_out[0][c][DIR_N];
    assign ext_out_s[c] = cell_out[ROWS-1][c][DIR_S];
  end
  for (genvar r = 0; r < ROWS; r++) begin : g_out_ew
    assign ext_out_e[r] = cell_out[r][COLS-1][DIR_E];
    assign ext_out_w[r] = cell_out[r][0][DIR_W];
  end

  // ---------------- FastLANE segments ----------------
  for (genvar k = 0; k <= ROWS; k++) begin : g_hch
    for (genvar s = 0; s < HSEGS; s++) begin : g_seg
      logic [FL_SPAN-1:0] en, val;
      for (genvar i = 0; i < FL_SPAN; i++) begin : g_drv
        if (k < ROWS && s * FL_SPAN + i < COLS) begin : g_cell
          assign en[i]  = fl_drv[k][s*FL_SPAN+i][1];
          assign val[i] = fl_val[k][s*FL_SPAN+i];
        end else begin : g_none
          assign en[i]  = 1'b0;
          assign val[i] = 1'b0;
        end
      end
      fastlane_seg #(.N(FL_SPAN)) u_seg (
        .drv_en (en), .drv_val (val),
        .ext (k == ROWS ? fl_ext_s[s] : 1'b0),
        .bus (hfl[k][s]), .conflict (hconf[k][s])
      );
    end
  end
  for (genvar k = 0; k <= COLS; k++) begin : g_vch
    for (genvar s = 0; s < VSEGS; s++) begin : g_seg
      logic [FL_SPAN-1:0] en, val;
      for (genvar i = 0; i < FL_SPAN; i++) begin : g_drv
        if (k < COLS && s * FL_SPAN + i < ROWS) begin : g_cell
          assign en[i]  = fl_drv[s*FL_SPAN+i][k][0];
          assign val[i] = fl_val[s*FL_SPAN+i][k];
        end else begin : g_none
          assign en[i]  = 1'b0;
          assign val[i] = 1'b0;
        end
      end
      fastlane_seg #(.N(FL_SPAN)) u_seg (
        .drv_en (en), .drv_val (val),
        .ext (k == COLS ? fl_ext_e[s] : 1'b0),
        .bus (vfl[k][s]), .conflict (vconf[k][s])
      );
    end
  end

  always_comb begin
    fl_conflict = 1'b0;
    for (int k = 0; k <= int'(ROWS); k++)
      for (int s = 0; s < int'(HSEGS); s++) fl_conflict |= hconf[k][s];
    for (int k = 0; k <= int'(COLS); k++)
      for (int s = 0; s < int'(VSEGS); s++) fl_conflict |= vconf[k][s];
  end

  // ---------------- configuration chain ----------------
  assign chain[0] = cfg_sdi;
  assign cfg_sdo  = chain[ROWS*COLS];

  // ---------------- clock tree ----------------
  always_comb begin
    tree_req = '0;
    for (int unsigned r = 0; r < ROWS; r++)
      for (int unsigned c = 0; c < COLS; c++)
        tree_req[htree_leaf(r, c, TBITS)] = clk_req[r][c];
  end

  clock_htree #(.LEVELS(LEVELS)) u_tree (
    .clk (clk), .req (tree_req), .gclk (tree_clk), .drv_on (clk_drv_on)
  );

endmodule
