// Testbench for freq_divider: divide-by-8 and divide-by-2 instances; the
// output must change level every 4 (resp. 1) input clocks.
module tb_freq_divider;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, q8, q2;

  freq_divider #(.DIV_LOG2(3)) dut8 (.clk(clk), .rst_n(rst_n), .q(q8));
  freq_divider #(.DIV_LOG2(1)) dut2 (.clk(clk), .rst_n(rst_n), .q(q2));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    for (int i = 1; i <= 64; i++) begin
      @(posedge clk); #1;
      checks += 2;
      if (q8 !== 1'((i / 4) % 2)) begin failures++; $display("FAIL q8 at %0d", i); end
      if (q2 !== 1'(i % 2))       begin failures++; $display("FAIL q2 at %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
