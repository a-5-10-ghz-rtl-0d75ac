// Testbench for fpga_array at 4 x 8 cells: loads one application serially
// and checks the routing example of cells C1..C8 (C7 = C5 ^ C6 with C5's
// result brought through C6's redirection mux), a redirection chain along
// row 2, a cell-driven FastLANE read by a cell in FastLANE mode, a clock
// divider on row 3 and the resulting clock-driver enables, FastLANE from the
// external east channel, and the master-key mute.
module tb_fpga_array;
  import fpga_pkg::*;
  import fpga_tb_pkg::*;

  localparam int R = 4, C = 8, P = R * C;
  localparam int HS = 2, VS = 1;
  localparam int TBITS = 3, NLEAF = 64;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, cfg_clk = 0, cfg_sdi = 0, cfg_sdo, mem_sel = 0, master_key = 0;
  logic [1:0] bank_en = 0;
  side_out_t [C-1:0] ext_in_n, ext_in_s, ext_out_n, ext_out_s;
  side_out_t [R-1:0] ext_in_e, ext_in_w, ext_out_e, ext_out_w;
  logic [HS-1:0] fl_ext_s;
  logic [VS-1:0] fl_ext_e;
  logic fl_conflict;
  logic [NLEAF-1:0] clk_drv_on;
  cfg_t img [R][C];

  fpga_array #(.ROWS(R), .COLS(C)) dut (
    .clk, .rst_n, .cfg_clk, .cfg_sdi, .cfg_sdo, .bank_en, .mem_sel, .master_key,
    .ext_in_n, .ext_in_s, .ext_in_e, .ext_in_w, .ext_out_n, .ext_out_s, .ext_out_e,
    .ext_out_w, .fl_ext_s, .fl_ext_e, .fl_conflict, .clk_drv_on
  );

  always #3 cfg_clk = ~cfg_clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  function automatic int leaf_of(int r, int c);
    int idx = 0;
    for (int i = 0; i < TBITS; i++) begin
      idx |= ((r >> i) & 1) << (2 * i);
      idx |= ((c >> i) & 1) << (2 * i + 1);
    end
    return idx;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NLEAF-1:0] exp_drv;
    int toggles;
    ext_in_n = '0; ext_in_s = '0; ext_in_e = '0; ext_in_w = '0; fl_ext_s = '0; fl_ext_e = '0;
    foreach (img[r, c]) img[r][c] = '0;
    img[1][0] = buffer(DIR_W, M_FZ, 1'b0, dbit(DIR_E));                 // C5 = a
    img[0][1] = buffer(DIR_N, M_FZ, 1'b0, dbit(DIR_S));                 // C2 = b
    img[1][1] = buffer(DIR_N, M_FZ, 1'b0, dbit(DIR_E));                 // C6 = b
    img[1][1].redir_e = cr(DIR_E, DIR_W, M_FZ);
    img[1][2] = f_xor(DIR_W, M_FZ, DIR_W, M_RD, dbit(DIR_N));           // C7
    img[0][2].redir_n = cr(DIR_N, DIR_S, M_FZ);                         // C3
    img[2][0] = buffer(DIR_W, M_FZ, 1'b1, dbit(DIR_E));                 // chain source, inverted
    img[2][1].redir_e = cr(DIR_E, DIR_W, M_FZ);
    for (int c = 2; c < C; c++) img[2][c].redir_e = cr(DIR_E, DIR_W, M_RD);
    img[0][4] = buffer(DIR_N, M_FZ, 1'b0, 4'b0000);
    img[0][4].fl_drv = 2'b10;
    img[0][6] = core(c16(DIR_N, M_FL), c17(DIR_E, M_FL), c17(DIR_W, M_FL), 3'b010, dbit(DIR_N));
    img[3][7] = core(4'd0, C17_FD, C17_FD, 3'b011, dbit(DIR_S));        // divider
    img[3][7].latch_on = 1'b1;
    img[1][7] = buffer(DIR_E, M_FL, 1'b0, dbit(DIR_E));                 // reads external east channel

    #10 rst_n = 1;
    for (int pos = P - 1; pos >= 0; pos--) begin
      automatic int r = pos / C;
      automatic int c = (r % 2 == 0) ? pos % C : C - 1 - pos % C;
      for (int b = CFG_BITS - 1; b >= 0; b--) begin
        @(negedge cfg_clk) cfg_sdi = img[r][c][b];
      end
    end
    @(negedge cfg_clk) bank_en = 2'b01;
    @(negedge cfg_clk) bank_en = 2'b00;
    #1;

    for (int i = 0; i < 32; i++) begin
      logic a, b, cc, d, e;
      {a, b, cc, d, e} = 5'($urandom);
      ext_in_w[1].fz = a; ext_in_n[1].fz = b; ext_in_w[2].fz = cc; ext_in_n[4].fz = d;
      fl_ext_e = e;
      #1;
      check("C7 = a ^ b", ext_out_n[2].rd, a ^ b);
      check("redirection chain", ext_out_e[2].rd, !cc);
      check("cell-driven FastLANE", ext_out_n[6].fz, d);
      check("external FastLANE", ext_out_e[1].fz, e);
      check("no conflict", fl_conflict, 1'b0);
    end

    exp_drv = '0;
    begin
      automatic int n = (NLEAF + leaf_of(3, 7)) / 2;
      while (n >= 1) begin exp_drv[n] = 1'b1; n /= 2; end
    end
    check("clock drivers", clk_drv_on == exp_drv, 1'b1);

    toggles = 0;
    for (int i = 0; i < 16; i++) begin
      automatic logic prev = ext_out_s[7].sz;
      #10 clk = 1; #1;
      if (ext_out_s[7].sz !== prev) toggles++;
      #10 clk = 0;
    end
    check("divider", toggles, 16);

    master_key = 1; #1;
    check("mute", {ext_out_n, ext_out_e, ext_out_s, ext_out_w} != 0, 1'b0);
    check("mute clock", clk_drv_on == 0, 1'b1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
