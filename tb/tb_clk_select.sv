// Testbench for clk_select: two clocks of different period; counts output
// edges with each select setting and compares with the chosen source.
module tb_clk_select;
  int checks = 0, failures = 0;
  logic vco = 0, ext = 0, sel = 0, clk;
  int n_out, n_vco, n_ext;

  clk_select dut (.vco_clk(vco), .ext_clk(ext), .sel(sel), .clk(clk));

  always #5 vco = ~vco;
  always #17 ext = ~ext;
  always @(posedge clk) n_out++;
  always @(posedge vco) n_vco++;
  always @(posedge ext) n_ext++;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++) begin
      sel = s[0];
      #3;
      n_out = 0; n_vco = 0; n_ext = 0;
      #2000;
      checks++;
      if (n_out != (s ? n_ext : n_vco)) begin
        failures++;
        $display("FAIL sel=%0d out=%0d vco=%0d ext=%0d", s, n_out, n_vco, n_ext);
      end
      for (int i = 0; i < 50; i++) begin
        #7;
        while ($time % 5 == 0 || $time % 17 == 0) #1;
        checks++;
        if (clk !== (s ? ext : vco)) begin failures++; $display("FAIL level sel=%0d", s); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
