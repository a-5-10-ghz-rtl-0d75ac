// Testbench for fastlane_seg: random driver enables and values; the bus is
// the value of the enabled drivers (or the external input) and conflict is
// raised when more than one source is enabled.
module tb_fastlane_seg;
  int checks = 0, failures = 0;
  logic [3:0] en, val;
  logic ext, bus, conflict;

  fastlane_seg #(.N(4)) dut (.drv_en(en), .drv_val(val), .ext(ext), .bus(bus), .conflict(conflict));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      int n;
      logic exp;
      en = 4'($urandom); val = 4'($urandom); ext = ($urandom % 4) == 0;
      n = ext; exp = ext;
      for (int k = 0; k < 4; k++) if (en[k]) begin n++; exp |= val[k]; end
      #1;
      checks += 2;
      if (bus !== exp) begin failures++; $display("FAIL bus en=%b val=%b ext=%b", en, val, ext); end
      if (conflict !== (n > 1)) begin failures++; $display("FAIL conflict en=%b ext=%b", en, ext); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
