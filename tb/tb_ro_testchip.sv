// Testbench for ro_testchip: with both supplies on, the high-speed outputs
// must have period 8 * 800 and the low-power ones 8 * 2000 time units; with
// the supplies off, nothing toggles.
module tb_ro_testchip;
  int checks = 0, failures = 0;
  logic rst_n = 0, en_hs = 0, en_lp = 0;
  logic [3:0] ro_osc, ro_out;
  time last [4], per [4];
  int edges [4];

  ro_testchip dut (.rst_n(rst_n), .en_hs(en_hs), .en_lp(en_lp), .ro_osc(ro_osc), .ro_out(ro_out));

  for (genvar i = 0; i < 4; i++) begin : g_mon
    always @(posedge ro_out[i]) begin per[i] = $time - last[i]; last[i] = $time; edges[i]++; end
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin last[i] = 0; per[i] = 0; edges[i] = 0; end
    #100 rst_n = 1;
    #5000;
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (edges[i] != 0) begin failures++; $display("FAIL ring %0d runs unpowered", i); end
    end
    en_hs = 1; en_lp = 1;
    #100000;
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (per[i] != (i < 2 ? 6400 : 16000)) begin
        failures++;
        $display("FAIL ring %0d output period %0t", i, per[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
