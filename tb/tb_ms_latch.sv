// Testbench for ms_latch: random data and power-on against a reference
// register updated on the same clock edge.
module tb_ms_latch;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, on, d, q;
  logic ref_q;

  ms_latch dut (.clk(clk), .rst_n(rst_n), .on(on), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    on = 1; d = 0; ref_q = 0;
    #12 rst_n = 1;
    checks++; if (q !== 1'b0) begin failures++; $display("FAIL reset"); end
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      on = ($urandom % 4) != 0;
      d  = 1'($urandom);
      #1;
      checks++;   // powering up shows the bit stored before, not new data
      if (q !== (on & ref_q)) begin
        failures++;
        $display("FAIL cycle %0d before edge: q=%b expected %b", i, q, on & ref_q);
      end
      @(posedge clk);
      if (on) ref_q = d;
      #1;
      checks++;
      if (q !== (on & ref_q)) begin
        failures++;
        $display("FAIL cycle %0d: q=%b expected %b", i, q, on & ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
