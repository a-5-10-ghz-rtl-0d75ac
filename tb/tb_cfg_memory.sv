// Testbench for cfg_memory: shifts two 41-bit patterns in, stores them in
// the two banks, checks both personalities through mem_sel, and checks that
// sdo repeats sdi 41 clocks later.
module tb_cfg_memory;
  import fpga_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, sdi = 0, sdo, mem_sel = 0;
  logic [1:0] bank_en = 0;
  cfg_t cfg;
  logic [40:0] pat [2];
  logic hist [$];

  cfg_memory dut (.cfg_clk(clk), .rst_n(rst_n), .sdi(sdi), .sdo(sdo),
                  .bank_en(bank_en), .mem_sel(mem_sel), .cfg(cfg));

  always #5 clk = ~clk;

  task automatic check(string what, logic [40:0] got, logic [40:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic shift_in(logic [40:0] p);
    for (int b = 40; b >= 0; b--) begin
      @(negedge clk);
      sdi = p[b];
      hist.push_back(p[b]);
    end
  endtask

  initial begin
    #50000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sdo_checks;
    pat[0] = {$urandom, $urandom};
    pat[1] = {$urandom, $urandom};
    #12 rst_n = 1;
    check("reset bank", cfg, '0);
    shift_in(pat[0]);
    @(negedge clk) bank_en = 2'b01;
    @(negedge clk) bank_en = 2'b00;
    check("bank 1 after load", cfg, pat[0]);
    hist.delete();
    shift_in(pat[1]);
    @(negedge clk) bank_en = 2'b10;
    @(negedge clk) bank_en = 2'b00;
    mem_sel = 1; #1;
    check("bank 2", cfg, pat[1]);
    mem_sel = 0; #1;
    check("bank 1 kept", cfg, pat[0]);
    // serial output: the bit shifted in 41 clocks earlier
    hist.delete();
    sdo_checks = 0;
    for (int i = 0; i < 120; i++) begin
      @(negedge clk);
      sdi = 1'($urandom);
      hist.push_front(sdi);
      if (hist.size() > 41) begin
        checks++;
        if (sdo !== hist[41]) begin failures++; $display("FAIL sdo at %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
