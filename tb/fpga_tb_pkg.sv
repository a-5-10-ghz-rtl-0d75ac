// Helpers for the FPGA testbenches: build cell configurations from the
// documented bit fields and select codes, independently of the RTL's
// decoding logic.
package fpga_tb_pkg;
  import fpga_pkg::*;

  localparam int M_FZ = 0, M_SZ = 1, M_RD = 2, M_FL = 3;

  // 17:1 code for a side input (dir 0..3 = N,E,S,W), or the feedback
  function automatic logic [4:0] c17(int dir, int member);
    return 5'(dir * 4 + member + 1);
  endfunction
  localparam logic [4:0] C17_FD = 5'd17;

  // 16:1 code for a side input
  function automatic logic [3:0] c16(int dir, int member);
    return 4'(dir * 4 + member);
  endfunction

  // 9:1 redirection code for the mux facing `own`, taking `member` (FZ, SZ,
  // RD) from side `from`
  function automatic logic [3:0] cr(int own, int from, int member);
    int slot;
    slot = (from < own) ? from : from - 1;
    return 4'(1 + slot * 3 + member);
  endfunction

  // core: FZ = X1 ? X2 : X3
  function automatic cfg_t core(logic [3:0] x1, logic [4:0] x2, logic [4:0] x3,
                                logic [2:0] inv, logic [3:0] drv);
    cfg_t c;
    c = '0;
    c.core_on = 1'b1;
    c.sel_x1  = x1;
    c.sel_x2  = x2;
    c.sel_x3  = x3;
    c.inv     = inv;
    c.drv_en  = drv;
    return c;
  endfunction

  // buffer (or inverter) of one side input
  function automatic cfg_t buffer(int dir, int member, bit invert, logic [3:0] drv);
    return core(4'd0, c17(dir, member), c17(dir, member), {1'b0, invert, invert}, drv);
  endfunction

  // Table 1 functions of inputs a and b (both 17:1 side codes)
  function automatic cfg_t f_and(int da, int ma, int db, int mb, logic [3:0] drv);
    return core(c16(da, ma), c17(db, mb), c17(da, ma), 3'b000, drv);
  endfunction
  function automatic cfg_t f_xor(int da, int ma, int db, int mb, logic [3:0] drv);
    return core(c16(da, ma), c17(db, mb), c17(db, mb), 3'b010, drv);
  endfunction

  function automatic logic [3:0] dbit(int dir);
    return 4'(1 << dir);
  endfunction

endpackage
