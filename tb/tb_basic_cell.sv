// Testbench for basic_cell: loads two configurations serially (AND into
// bank 1, XOR into bank 2), switches between them with mem_sel, and checks
// the cell's function and the serial pass-through of the shift register.
module tb_basic_cell;
  import fpga_pkg::*;
  import fpga_tb_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, cfg_clk = 0, sdi = 0, sdo, mem_sel = 0, mute = 0;
  logic [1:0] bank_en = 0;
  side_in_t  [3:0] in_side;
  side_out_t [3:0] out_side;
  logic [1:0] fl_drv;
  logic fl_val, clk_req, fz, sz;
  mode_e mode;
  logic sent [$];

  basic_cell dut (.clk(clk), .rst_n(rst_n), .cfg_clk(cfg_clk), .sdi(sdi), .sdo(sdo),
                  .bank_en(bank_en), .mem_sel(mem_sel), .mute(mute), .in_side(in_side),
                  .out_side(out_side), .fl_drv(fl_drv), .fl_val(fl_val), .clk_req(clk_req),
                  .fz(fz), .sz(sz), .mode(mode));

  always #5 cfg_clk = ~cfg_clk;

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %b expected %b", what, got, exp); end
  endtask

  task automatic load(cfg_t c, int bank);
    for (int b = CFG_BITS - 1; b >= 0; b--) begin
      @(negedge cfg_clk) sdi = c[b];
      sent.push_back(c[b]);
    end
    @(negedge cfg_clk) bank_en = 2'(1 << bank);
    @(negedge cfg_clk) bank_en = 2'b00;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_side = '0;
    #12 rst_n = 1;
    check("muted after reset", fz, 1'b0);
    load(f_and(DIR_N, M_FZ, DIR_W, M_SZ, 4'b1111), 0);
    load(f_xor(DIR_N, M_FZ, DIR_W, M_SZ, 4'b1111), 1);
    for (int s = 0; s < 2; s++) begin
      mem_sel = s[0];
      for (int v = 0; v < 4; v++) begin
        in_side = '0;
        in_side[DIR_N].fz = v[0];
        in_side[DIR_W].sz = v[1];
        #1;
        check($sformatf("personality %0d v=%0d", s, v), out_side[DIR_E].fz,
              s == 0 ? (v[0] & v[1]) : (v[0] ^ v[1]));
      end
    end
    // serial pass-through: the stream comes out 41 clocks after it went in
    sent.delete();
    for (int i = 0; i < 100; i++) begin
      @(negedge cfg_clk) sdi = 1'($urandom);
      sent.push_front(sdi);
      if (sent.size() > CFG_BITS) check("sdo", sdo, sent[CFG_BITS]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
