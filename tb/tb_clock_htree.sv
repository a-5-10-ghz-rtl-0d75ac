// Testbench for clock_htree (4 levels, 16 leaves): for random request sets,
// counts clock edges at every leaf and checks that a leaf is clocked exactly
// when it or its level-1 partner requests, and that the enabled drivers are
// exactly the ancestors of requesting leaves.
module tb_clock_htree;
  localparam int L = 4, N = 16;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [N-1:0] req, gclk, drv_on;
  int edges [N];

  clock_htree #(.LEVELS(L)) dut (.clk(clk), .req(req), .gclk(gclk), .drv_on(drv_on));

  always #5 clk = ~clk;
  for (genvar i = 0; i < N; i++) begin : g_cnt
    always @(posedge gclk[i]) edges[i]++;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0;
    for (int t = 0; t < 40; t++) begin
      logic [N-1:0] exp_drv;
      @(negedge clk);
      req = (t == 0) ? '0 : 16'($urandom & $urandom);
      for (int i = 0; i < N; i++) edges[i] = 0;
      repeat (10) @(negedge clk);
      exp_drv = '0;
      for (int i = 0; i < N; i++) if (req[i]) begin
        int n;
        n = (N + i) / 2;
        while (n >= 1) begin exp_drv[n] = 1'b1; n = n / 2; end
      end
      for (int i = 0; i < N; i++) begin
        int exp_edges;
        exp_edges = (req[i] || req[i ^ 1]) ? 10 : 0;
        checks++;
        if (edges[i] != exp_edges) begin
          failures++;
          $display("FAIL leaf %0d req=%b edges=%0d expected %0d", i, req, edges[i], exp_edges);
        end
      end
      checks++;
      if (drv_on !== exp_drv) begin failures++; $display("FAIL drv_on %b expected %b", drv_on, exp_drv); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
