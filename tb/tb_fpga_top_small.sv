// End-to-end testbench of the FPGA chip at a reduced 6x12 size (the same
// test as the full-size one; the demultiplexer has C-4 = 8 channels).
//
// Two applications are loaded serially through the configuration chain, one
// into each memory bank (the readback port is checked on the way), then run:
//  personality 1 (bank 1):
//   * the routing example of cells C1..C8 (rows 0-1, columns 0-3): C7 takes
//     C5's result through C6's redirection mux and C6's own result on the
//     same side, computes their XOR, and C3 redirects it to the north edge;
//   * a redirection chain across row 2 (C-1 cells);
//   * a FastLANE driven by cell (0,C-8) and read by cell (0,C-6) in FastLANE mode;
//   * a 1:16 demultiplexer: 16 sampling cells on the last row take DATA from the
//     south FastLANE channel and SEL from a rotating one-hot (barrel) counter,
//     and hold their sample through the latch feedback otherwise;
//   * a clock divider at cell (R-1,C-2).
//  personality 2 (bank 2): C7 computes AND, the rest is off, so the clock
//   tree turns every driver off and the divider stops.
// Also: clock source select (VCO / external), master-key mute, and the
// ring-oscillator test chip beside the array (period of ring A after /8). Each mechanism
// is counted and must have happened at least once.
module tb_fpga_top_small;
  import fpga_pkg::*;
  import fpga_tb_pkg::*;

  localparam int R = 6, C = 12, P = R * C;
  localparam int HS = (C + 3) / 4, VS = (R + 3) / 4;
  localparam int TB_BITS = $clog2(R > C ? R : C);
  localparam int CHR = 2;                          // redirection chain row
  localparam int FLD = C - 8;                      // FastLANE driver column
  localparam int NDM = (C - 4 < 16) ? C - 4 : 16;  // demultiplexer channels
  localparam int DIV = C - 2;                      // divider column
  localparam int NLEAF = 1 << (2 * TB_BITS);

  int checks = 0, failures = 0;
  int n_route = 0, n_redir_chain = 0, n_fastlane = 0, n_demux_sample = 0, n_demux_hold = 0;
  int n_divider = 0, n_bank_switch = 0, n_mute = 0, n_readback = 0, n_clk_gate = 0, n_clk_src = 0, n_ring = 0;

  logic vco_clk = 0, ext_clk = 0, clk_sel = 1, rst_n = 0, cfg_clk = 0, cfg_sdi = 0, cfg_sdo;
  logic [1:0] bank_en = 0;
  logic mem_sel = 0, master_key = 0;
  side_out_t [C-1:0] ext_in_n, ext_in_s, ext_out_n, ext_out_s;
  side_out_t [R-1:0] ext_in_e, ext_in_w, ext_out_e, ext_out_w;
  logic [HS-1:0] fl_ext_s;
  logic [VS-1:0] fl_ext_e;
  logic fl_conflict;
  logic [NLEAF-1:0] clk_drv_on;
  logic ro_rst_n = 0, ro_en_hs = 0, ro_en_lp = 0;
  logic [3:0] ro_out;

  fpga_top #(.ROWS(R), .COLS(C)) dut (
    .vco_clk, .ext_clk, .clk_sel, .rst_n, .cfg_clk, .cfg_sdi, .cfg_sdo, .bank_en, .mem_sel,
    .master_key, .ext_in_n, .ext_in_s, .ext_in_e, .ext_in_w, .ext_out_n, .ext_out_s,
    .ext_out_e, .ext_out_w, .fl_ext_s, .fl_ext_e, .fl_conflict, .clk_drv_on,
    .ro_rst_n, .ro_en_hs, .ro_en_lp, .ro_out
  );

  cfg_t img [2][R][C];
  logic stream [2][$];

  always #3 cfg_clk = ~cfg_clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  // one system clock cycle from the selected source
  task automatic sys_cycle();
    if (clk_sel) begin #40 ext_clk = 1; #40 ext_clk = 0; end
    else         begin #50 vco_clk = 1; #50 vco_clk = 0; end
  endtask

  function automatic int chain_r(int pos); return pos / C; endfunction
  function automatic int chain_c(int pos);
    int r = pos / C;
    return (r % 2 == 0) ? pos % C : C - 1 - pos % C;
  endfunction

  // shift image k in (last chain cell first, MSB first), checking that the
  // previous contents come out of cfg_sdo, then write bank k
  task automatic load(int k);
    int idx;
    stream[k].delete();
    for (int pos = P - 1; pos >= 0; pos--)
      for (int b = CFG_BITS - 1; b >= 0; b--)
        stream[k].push_back(img[k][chain_r(pos)][chain_c(pos)][b]);
    idx = 0;
    foreach (stream[k][i]) begin
      @(negedge cfg_clk);
      if (k > 0) begin
        checks++;
        // the two bank-write clocks after the previous load shifted the
        // chain by two more places
        if (cfg_sdo !== stream[k-1][(i + 2 < P * CFG_BITS) ? i + 2 : P * CFG_BITS - 1]) begin
          failures++;
          if (failures < 10) $display("FAIL readback bit %0d", i);
        end else n_readback++;
      end
      cfg_sdi = stream[k][i];
    end
    @(negedge cfg_clk) bank_en = 2'(1 << k);
    @(negedge cfg_clk) bank_en = 2'b00;
  endtask

  // expected clock drivers on: every ancestor of a requesting leaf
  function automatic int leaf_of(int r, int c);
    int idx = 0;
    for (int i = 0; i < TB_BITS; i++) begin
      idx |= ((r >> i) & 1) << (2 * i);
      idx |= ((c >> i) & 1) << (2 * i + 1);
    end
    return idx;
  endfunction

  initial begin
    #200000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NLEAF-1:0] exp_drv;
    logic [15:0] sampled;
    int toggles;

    ext_in_n = '0; ext_in_s = '0; ext_in_e = '0; ext_in_w = '0; fl_ext_s = '0; fl_ext_e = '0;
    foreach (img[k, r, c]) img[k][r][c] = '0;

    // ---------- personality 1 ----------
    img[0][1][0] = buffer(DIR_W, M_FZ, 1'b0, dbit(DIR_E));                   // C5 = a
    img[0][0][1] = buffer(DIR_N, M_FZ, 1'b0, dbit(DIR_S));                   // C2 = b
    img[0][1][1] = buffer(DIR_N, M_FZ, 1'b0, dbit(DIR_E));                   // C6 = b
    img[0][1][1].redir_e = cr(DIR_E, DIR_W, M_FZ);                           //   and passes a east
    img[0][1][2] = f_xor(DIR_W, M_FZ, DIR_W, M_RD, dbit(DIR_N));             // C7 = b ^ a
    img[0][0][2].redir_n = cr(DIR_N, DIR_S, M_FZ);                           // C3 -> north edge
    img[0][CHR][0] = buffer(DIR_W, M_FZ, 1'b0, dbit(DIR_E));                   // chain source
    img[0][CHR][1].redir_e = cr(DIR_E, DIR_W, M_FZ);
    for (int c = 2; c < C; c++) img[0][CHR][c].redir_e = cr(DIR_E, DIR_W, M_RD);
    img[0][0][FLD] = buffer(DIR_N, M_FZ, 1'b0, 4'b0000);                      // FastLANE driver
    img[0][0][FLD].fl_drv = 2'b10;
    img[0][0][FLD+2] = core(c16(DIR_N, M_FL), c17(DIR_E, M_FL), c17(DIR_W, M_FL), 3'b010, dbit(DIR_N));
    for (int c = 0; c < NDM; c++) begin                                     // demux cells
      img[0][R-1][c] = core(c16(DIR_S, M_FZ), c17(DIR_S, M_FL), C17_FD, 3'b000, dbit(DIR_S));
      img[0][R-1][c].latch_on = 1'b1;
    end
    img[0][R-1][DIV] = core(4'd0, C17_FD, C17_FD, 3'b011, dbit(DIR_S));       // divider
    img[0][R-1][DIV].latch_on = 1'b1;
    check("mode of FastLANE cell", cell_mode(img[0][0][FLD+2]), MODE_FASTLANE);

    // ---------- personality 2 ----------
    img[1][1][0] = img[0][1][0];
    img[1][0][1] = img[0][0][1];
    img[1][1][1] = img[0][1][1];
    img[1][1][2] = f_and(DIR_W, M_RD, DIR_W, M_FZ, dbit(DIR_N));             // C7 = a & b
    img[1][0][2] = img[0][0][2];

    #10 rst_n = 1;
    check("reset: edge outputs off", {ext_out_n, ext_out_e} != 0, 1'b0);

    load(0);
    load(1);

    // ---------- run personality 1 ----------
    mem_sel = 0;
    #1;
    check("no FastLANE conflict", fl_conflict, 1'b0);
    for (int i = 0; i < 32; i++) begin
      logic a, b, cc, d;
      {a, b, cc, d} = 4'($urandom);
      ext_in_w[1].fz = a; ext_in_n[1].fz = b; ext_in_w[CHR].fz = cc; ext_in_n[FLD].fz = d;
      #1;
      check("C7 = a ^ b via C6 redirection", ext_out_n[2].rd, a ^ b);
      if (ext_out_n[2].rd === (a ^ b)) n_route++;
      check("redirection chain", ext_out_e[CHR].rd, cc);
      if (ext_out_e[CHR].rd === cc) n_redir_chain++;
      check("FastLANE", ext_out_n[FLD+2].fz, d);
      if (ext_out_n[FLD+2].fz === d) n_fastlane++;
    end

    // clock tree: drivers on exactly on the paths of latch cells
    exp_drv = '0;
    for (int c = 0; c < C; c++) if (img[0][R-1][c].latch_on) begin
      automatic int n = (NLEAF + leaf_of(R - 1, c)) / 2;
      while (n >= 1) begin exp_drv[n] = 1'b1; n /= 2; end
    end
    check("clock drivers of personality 1", clk_drv_on == exp_drv, 1'b1);
    if (clk_drv_on == exp_drv && clk_drv_on != '1) n_clk_gate++;

    // divider, external clock
    for (int s = 0; s < 2; s++) begin
      clk_sel = (s == 0);
      toggles = 0;
      for (int i = 0; i < 20; i++) begin
        logic prev;
        prev = ext_out_s[DIV].sz;
        sys_cycle();
        #1 if (ext_out_s[DIV].sz !== prev) toggles++;
      end
      check($sformatf("divider toggles each cycle (clk_sel=%0d)", clk_sel), toggles, 20);
      if (toggles == 20) begin n_divider++; n_clk_src++; end
    end
    clk_sel = 1;

    // 1:16 demultiplexer
    for (int i = 0; i < NDM; i++) begin
      automatic logic data = 1'($urandom);
      sampled[i] = data;
      for (int c = 0; c < NDM; c++) ext_in_s[c].fz = (c == i);
      fl_ext_s = {HS{data}};
      sys_cycle();
      #1 check($sformatf("demux channel %0d sampled", i), ext_out_s[i].sz, data);
      n_demux_sample++;
    end
    for (int c = 0; c < NDM; c++) ext_in_s[c].fz = 1'b0;
    for (int i = 0; i < 8; i++) begin
      fl_ext_s = HS'($urandom);
      sys_cycle();
      #1;
      for (int c = 0; c < NDM; c++) check("demux hold", ext_out_s[c].sz, sampled[c]);
      n_demux_hold++;
    end

    // ---------- switch to personality 2 ----------
    mem_sel = 1;
    n_bank_switch++;
    for (int i = 0; i < 8; i++) begin
      logic a, b;
      {a, b} = 2'($urandom);
      ext_in_w[1].fz = a; ext_in_n[1].fz = b;
      #1 check("personality 2: C7 = a & b", ext_out_n[2].rd, a & b);
    end
    check("personality 2: all clock drivers off", clk_drv_on == '0, 1'b1);
    if (clk_drv_on == '0) n_clk_gate++;
    begin
      logic prev;
      prev = ext_out_s[DIV].sz;
      repeat (4) sys_cycle();
      check("divider stopped", ext_out_s[DIV].sz, 1'b0);
    end

    // ---------- back to personality 1, then master key ----------
    mem_sel = 0;
    n_bank_switch++;
    ext_in_w[1].fz = 1; ext_in_n[1].fz = 0; ext_in_w[CHR].fz = 1;
    #1 check("personality 1 again", ext_out_n[2].rd, 1'b1);
    master_key = 1;
    #1;
    check("mute: north edge", ext_out_n != 0, 1'b0);
    check("mute: east edge", ext_out_e != 0, 1'b0);
    check("mute: south edge", ext_out_s != 0, 1'b0);
    check("mute: clock tree off", clk_drv_on == '0, 1'b1);
    n_mute++;
    master_key = 0;
    #1 check("unmuted", ext_out_e[CHR].rd, 1'b1);

    // ---------- ring-oscillator test chip ----------
    ro_rst_n = 1;
    ro_en_hs = 1;
    begin
      automatic int edges = 0;
      automatic time t0 = 0, per = 0;
      repeat (3) begin
        @(posedge ro_out[0]);
        per = $time - t0; t0 = $time; edges++;
      end
      check("ring A divided period = 8 * 2 * 4 * 100", 32'(per), 32'd6400);
      if (per == 6400) n_ring++;
    end
    ro_en_hs = 0;

    // ---------- every mechanism happened ----------
    if (n_ring == 0)         begin failures++; $display("never: ring oscillation"); end
    if (n_route == 0)        begin failures++; $display("never: routing via redirection"); end
    if (n_redir_chain == 0)  begin failures++; $display("never: redirection chain"); end
    if (n_fastlane == 0)     begin failures++; $display("never: FastLANE"); end
    if (n_demux_sample == 0) begin failures++; $display("never: demux sample"); end
    if (n_demux_hold == 0)   begin failures++; $display("never: demux hold"); end
    if (n_divider == 0)      begin failures++; $display("never: divider"); end
    if (n_bank_switch == 0)  begin failures++; $display("never: personality switch"); end
    if (n_mute == 0)         begin failures++; $display("never: mute"); end
    if (n_readback == 0)     begin failures++; $display("never: readback"); end
    if (n_clk_gate < 2)      begin failures++; $display("never: clock gating"); end
    if (n_clk_src < 2)       begin failures++; $display("never: both clock sources"); end
    $display("mechanisms: route=%0d chain=%0d fastlane=%0d sample=%0d hold=%0d divider=%0d switch=%0d mute=%0d readback=%0d clkgate=%0d clksrc=%0d",
             n_route, n_redir_chain, n_fastlane, n_demux_sample, n_demux_hold, n_divider,
             n_bank_switch, n_mute, n_readback, n_clk_gate, n_clk_src);
    $display("ring oscillator periods checked: %0d", n_ring);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
