// Shared types and constants of the multiplexer-based FPGA.
//
// Every basic cell (CLB) is configured by 41 bits held in its configuration
// memory. The cfg_t struct below fixes the meaning and order of those bits.
// The total of 41 bits per cell, the multiplexer sizes (two 17:1, one 16:1,
// four 9:1) and the grouping of signals per side follow the original design; the order
// of the fields, the select encodings and the use of the bits left over after
// the multiplexer selects (output driver enables, FastLANE drive) are this
// design's own choice.
//
// Select encodings (chosen so that an all-zero configuration turns a cell off,
// matching "by resetting all select bits, a multiplexer can be turned off"):
//   sel_x2, sel_x3 (17:1): 0 = off, 1..16 = side input (code-1), 17 = FD
//   sel_x1        (16:1): 0..15 = side input, gated by core_on
//   redir_*        (9:1): 0 = off, 1..9 = input (code-1)
// Side input index = dir*4 + member, dir N=0 E=1 S=2 W=3, member FZ=0 SZ=1
// RD=2 FL=3. Redirection input index = slot*3 + member, slots being the three
// other sides in N,E,S,W order, member FZ=0 SZ=1 RD=2.
package fpga_pkg;

  localparam int unsigned CFG_BITS = 41;  // configuration bits per cell
  localparam int unsigned FL_SPAN  = 4;   // CLBs sharing one FastLANE segment

  typedef enum logic [1:0] {
    DIR_N = 2'd0,
    DIR_E = 2'd1,
    DIR_S = 2'd2,
    DIR_W = 2'd3
  } dir_e;

  // Signals a cell receives on one side: neighbour's combinational result,
  // neighbour's sequential result, neighbour's redirection toward this cell,
  // and the FastLANE running along that side. fz is bit 0.
  typedef struct packed {
    logic fl;
    logic rd;
    logic sz;
    logic fz;
  } side_in_t;

  // Signals a cell sends to the neighbour on one side.
  typedef struct packed {
    logic rd;
    logic sz;
    logic fz;
  } side_out_t;

  // One cell's 41 configuration bits (first field is the MSB).
  typedef struct packed {
    logic [1:0] fl_drv;    // [1] drive FZ onto FastLANE North, [0] onto FastLANE West
    logic [3:0] drv_en;    // output driver enables, index = dir_e
    logic       latch_on;  // MS-latch powered; also requests the clock
    logic       core_on;   // core 2:1 mux and 16:1 select mux powered
    logic [3:0] redir_w;   // 9:1 redirection mux facing west
    logic [3:0] redir_s;   // facing south
    logic [3:0] redir_e;   // facing east
    logic [3:0] redir_n;   // facing north
    logic [2:0] inv;       // [2] complement X1, [1] X2, [0] X3
    logic [3:0] sel_x1;    // 16:1 mux -> core select X1
    logic [4:0] sel_x2;    // east 17:1 mux -> core input 1 (X2)
    logic [4:0] sel_x3;    // west 17:1 mux -> core input 0 (X3)
  } cfg_t;

  // Operating modes of one cell (power-saving classification of a loaded
  // configuration).
  typedef enum logic [2:0] {
    MODE_MUTE     = 3'd0,
    MODE_NORMAL   = 3'd1,
    MODE_SEQ      = 3'd2,
    MODE_FASTLANE = 3'd3,
    MODE_REDIR    = 3'd4,
    MODE_FULL     = 3'd5
  } mode_e;

  localparam logic [4:0] SEL17_FD = 5'd17;

  // Side-input code of the 17:1 muxes for a direction and member.
  function automatic logic [4:0] sel17(dir_e d, int unsigned member);
    return 5'(int'(d) * 4 + member + 1);
  endfunction

  // True if a 17:1 code selects a FastLANE input.
  function automatic logic is_fl17(logic [4:0] code);
    return (code >= 5'd1) && (code <= 5'd16) && ((code - 5'd1) % 4 == 3);
  endfunction

  function automatic mode_e cell_mode(cfg_t c);
    logic redir_on, fl_in;
    redir_on = (c.redir_n != 0) || (c.redir_e != 0) || (c.redir_s != 0) || (c.redir_w != 0);
    fl_in    = is_fl17(c.sel_x2) && is_fl17(c.sel_x3) && (c.sel_x1[1:0] == 2'd3);
    if (!c.core_on && !c.latch_on && !redir_on) return MODE_MUTE;
    if (!c.core_on) return MODE_REDIR;
    if (redir_on && c.latch_on) return MODE_FULL;
    if (fl_in && !redir_on) return MODE_FASTLANE;
    if (c.latch_on) return MODE_SEQ;
    return MODE_NORMAL;
  endfunction

  // Leaf index of cell (r, c) in the H-pattern clock tree: bits of r and c
  // interleaved, r in the lowest bit, so that the first-level driver serves
  // two vertically adjacent cells and the second level a 2x2 group.
  function automatic int unsigned htree_leaf(int unsigned r, int unsigned c, int unsigned bits);
    int unsigned idx;
    idx = 0;
    for (int unsigned i = 0; i < bits; i++) begin
      idx |= ((r >> i) & 1) << (2 * i);
      idx |= ((c >> i) & 1) << (2 * i + 1);
    end
    return idx;
  endfunction

endpackage
