// Testbench for ring_osc: measures the period of a 4-stage ring with 100
// and with 250 time units per stage and compares it with 2 * N * T; checks
// that the ring stops when disabled.
module tb_ring_osc;
  int checks = 0, failures = 0;
  logic en_a = 0, en_b = 0, osc_a, osc_b;
  time last_a = 0, last_b = 0, per_a = 0, per_b = 0;
  int edges_a = 0;

  ring_osc #(.STAGES(4), .STAGE_DELAY(100)) dut_a (.en(en_a), .osc(osc_a));
  ring_osc #(.STAGES(4), .STAGE_DELAY(250)) dut_b (.en(en_b), .osc(osc_b));

  always @(posedge osc_a) begin per_a = $time - last_a; last_a = $time; edges_a++; end
  always @(posedge osc_b) begin per_b = $time - last_b; last_b = $time; end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    en_a = 1; en_b = 1;
    #20000;
    checks += 2;
    if (per_a != 800)  begin failures++; $display("FAIL period A %0t", per_a); end
    if (per_b != 2000) begin failures++; $display("FAIL period B %0t", per_b); end
    en_a = 0;
    #2000;
    edges_a = 0;
    #5000;
    checks += 2;
    if (edges_a != 0) begin failures++; $display("FAIL ring A still running"); end
    if (osc_a !== 1'b0) begin failures++; $display("FAIL ring A output not 0"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
