// Testbench for clb.
//  * Table-1 functions (inverter, AND, XOR) built from the 2:1 core.
//  * Random configurations and inputs against a reference model written from
//    the configuration encoding (outputs, FastLANE drive, clock request).
//  * Clock divider (latch fed back complemented): SZ at half the clock rate.
//  * Demultiplexer sampling cell: DATA latched when SEL, held via FD else.
//  * Master key mute and the reported operating mode.
module tb_clb;
  import fpga_pkg::*;
  import fpga_tb_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, mute = 0;
  cfg_t cfg;
  side_in_t  [3:0] in_side;
  side_out_t [3:0] out_side;
  logic [1:0] fl_drv;
  logic fl_val, clk_req, fz, sz;
  mode_e mode;
  logic ref_st;   // reference latch state

  clb dut (.clk(clk), .rst_n(rst_n), .cfg(cfg), .mute(mute), .in_side(in_side),
           .out_side(out_side), .fl_drv(fl_drv), .fl_val(fl_val), .clk_req(clk_req),
           .fz(fz), .sz(sz), .mode(mode));

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  function automatic logic flat(int idx);
    return in_side[idx / 4][idx % 4];
  endfunction

  // reference of one input path: returns {on, value}
  function automatic logic [1:0] ref17(logic [4:0] code, logic fd);
    if (code == 0 || code > 17) return 2'b00;
    if (code == 17) return {1'b1, fd};
    return {1'b1, flat(code - 1)};
  endfunction

  function automatic logic ref_redir(int own, logic [3:0] code);
    int k, s, m;
    if (code == 0 || code > 9) return 1'b0;
    k = code - 1; s = k / 3; if (s >= own) s++; m = k % 3;
    return in_side[s][m];
  endfunction

  function automatic logic ref_fz(cfg_t c, logic st);
    logic [1:0] p1, p2, p3;
    logic x1, x2, x3, fd;
    if (mute || !c.core_on) return 1'b0;
    fd = c.latch_on & st;
    p1 = {1'b1, flat(c.sel_x1)};
    p2 = ref17(c.sel_x2, fd);
    p3 = ref17(c.sel_x3, fd);
    x1 = p1[1] & (p1[0] ^ c.inv[2]);
    x2 = p2[1] & (p2[0] ^ c.inv[1]);
    x3 = p3[1] & (p3[0] ^ c.inv[0]);
    return x1 ? x2 : x3;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic a, b;
    int toggles;
    cfg = '0; in_side = '0; ref_st = 0;
    #3 rst_n = 1;

    // ---- Table 1 functions, a = west FZ, b = east SZ ----
    for (int f = 0; f < 3; f++) begin
      case (f)
        0: cfg = buffer(DIR_W, M_FZ, 1'b1, 4'b0101);
        1: cfg = f_and(DIR_W, M_FZ, DIR_E, M_SZ, 4'b0101);
        default: cfg = f_xor(DIR_W, M_FZ, DIR_E, M_SZ, 4'b0101);
      endcase
      for (int v = 0; v < 4; v++) begin
        logic exp;
        a = v[0]; b = v[1];
        in_side = '0;
        in_side[DIR_W].fz = a;
        in_side[DIR_E].sz = b;
        #1;
        exp = (f == 0) ? !a : (f == 1) ? (a & b) : (a ^ b);
        check($sformatf("func %0d a=%b b=%b", f, a, b), fz, exp);
        check("driver N", out_side[DIR_N].fz, exp);
        check("driver S", out_side[DIR_S].fz, exp);
        check("driver E off", out_side[DIR_E].fz, 1'b0);
        check("driver W off", out_side[DIR_W].fz, 1'b0);
      end
      check("normal mode", mode, MODE_NORMAL);
    end

    // ---- random configurations (latch off: purely combinational) ----
    for (int i = 0; i < 3000; i++) begin
      cfg = cfg_t'({$urandom, $urandom});
      cfg.latch_on = 1'b0;
      in_side = 16'($urandom);
      mute = ($urandom % 16) == 0;
      #1;
      begin
        logic efz;
        efz = ref_fz(cfg, 1'b0);
        check($sformatf("rand fz %0d", i), fz, efz);
        for (int d = 0; d < 4; d++) begin
          check("rand out fz", out_side[d].fz, !mute && cfg.drv_en[d] && efz);
          check("rand out sz", out_side[d].sz, 1'b0);
          check("rand out rd", out_side[d].rd, !mute && ref_redir(d,
                (d == 0) ? cfg.redir_n : (d == 1) ? cfg.redir_e : (d == 2) ? cfg.redir_s : cfg.redir_w));
        end
        check("rand fl_drv", fl_drv, (!mute && cfg.core_on) ? cfg.fl_drv : 2'b00);
        check("rand clk_req", clk_req, 1'b0);
      end
    end
    mute = 0;

    // ---- clock divider: FZ = ~FD, latched every clock ----
    cfg = core(4'd0, C17_FD, C17_FD, 3'b011, 4'b0010);
    cfg.latch_on = 1'b1;
    #1 check("seq clk_req", clk_req, 1'b1);
    check("seq mode", mode, MODE_SEQ);
    toggles = 0;
    for (int i = 0; i < 40; i++) begin
      logic prev_sz;
      prev_sz = sz;
      #4 clk = 1; #1;
      if (sz != prev_sz) toggles++;
      check("divider out on E", out_side[DIR_E].sz, sz);
      #4 clk = 0; #1;
    end
    check("divider toggles once per clock (f/2)", toggles, 40);

    // ---- demux sampling cell: X1 = SEL (north FZ), X2 = DATA (south FZ), X3 = FD ----
    cfg = core(c16(DIR_N, M_FZ), c17(DIR_S, M_FZ), C17_FD, 3'b000, 4'b0001);
    cfg.latch_on = 1'b1;
    ref_st = sz;
    for (int i = 0; i < 200; i++) begin
      logic sel, data;
      sel = ($urandom % 4) == 0; data = 1'($urandom);
      in_side = '0;
      in_side[DIR_N].fz = sel;
      in_side[DIR_S].fz = data;
      #4 clk = 1; #1;
      if (sel) ref_st = data;
      check("demux sample/hold", sz, ref_st);
      check("demux out N", out_side[DIR_N].sz, ref_st);
      #4 clk = 0; #1;
    end

    // ---- redirection only ----
    cfg = '0;
    cfg.redir_e = cr(DIR_E, DIR_W, M_FZ);
    in_side = '0;
    for (int v = 0; v < 2; v++) begin
      in_side[DIR_W].fz = v[0];
      #1 check("redirect W->E", out_side[DIR_E].rd, v[0]);
    end
    check("redir mode", mode, MODE_REDIR);

    // ---- FastLANE mode: all core inputs from FastLANEs ----
    cfg = core(c16(DIR_N, M_FL), c17(DIR_E, M_FL), c17(DIR_W, M_FL), 3'b000, 4'b0001);
    #1 check("fastlane mode", mode, MODE_FASTLANE);
    in_side = '0; in_side[DIR_N].fl = 1; in_side[DIR_E].fl = 1;
    #1 check("fastlane select", fz, 1'b1);

    // ---- full mode and mute ----
    cfg.latch_on = 1'b1; cfg.redir_s = cr(DIR_S, DIR_N, M_RD);
    #1 check("full mode", mode, MODE_FULL);
    mute = 1; #1;
    check("mute mode", mode, MODE_MUTE);
    check("mute fz", fz, 1'b0);
    check("mute outputs", out_side, '0);
    check("mute clk_req", clk_req, 1'b0);
    cfg = '0; mute = 0; #1;
    check("all-zero config is mute", mode, MODE_MUTE);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
