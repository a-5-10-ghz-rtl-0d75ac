// Testbench for sel_mux: exhaustive codes for a 9:1 mux with off code 0 and
// a 4:1 mux with code base 0, random data, expected output from a direct
// index of the data word.
module tb_sel_mux;
  int checks = 0, failures = 0;

  logic [3:0] code9;  logic en9;  logic [8:0] d9;  logic y9, on9;
  logic [1:0] code4;  logic en4;  logic [3:0] d4;  logic y4, on4;

  sel_mux #(.N(9), .BASE(1), .W(4)) dut9 (.code(code9), .en(en9), .d(d9), .y(y9), .on(on9));
  sel_mux #(.N(4), .BASE(0), .W(2)) dut4 (.code(code4), .en(en4), .d(d4), .y(y4), .on(on4));

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 40; rep++) begin
      for (int c = 0; c < 16; c++) begin
        for (int e = 0; e < 2; e++) begin
          code9 = 4'(c); en9 = e[0]; d9 = 9'($urandom);
          #1;
          check("y9", y9, (e == 1 && c >= 1 && c <= 9) ? d9[c-1] : 1'b0);
          check("on9", on9, (e == 1 && c >= 1 && c <= 9));
        end
      end
      for (int c = 0; c < 4; c++) begin
        code4 = 2'(c); en4 = 1'b1; d4 = 4'($urandom);
        #1;
        check("y4", y4, d4[c]);
        check("on4", on4, 1'b1);
        en4 = 1'b0; #1;
        check("y4 off", y4, 1'b0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
