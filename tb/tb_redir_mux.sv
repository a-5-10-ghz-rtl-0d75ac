// Testbench for redir_mux: one instance per facing side, random inputs and
// codes; expected output is the chosen member of the chosen other side, and
// FastLANE inputs must never pass.
module tb_redir_mux;
  import fpga_pkg::*;
  int checks = 0, failures = 0;

  side_in_t [3:0] side;
  logic [3:0] code [4];
  logic en;
  logic [3:0] y, on;

  redir_mux #(.OWN(DIR_N)) dn (.side(side), .code(code[0]), .en(en), .y(y[0]), .on(on[0]));
  redir_mux #(.OWN(DIR_E)) de (.side(side), .code(code[1]), .en(en), .y(y[1]), .on(on[1]));
  redir_mux #(.OWN(DIR_S)) ds (.side(side), .code(code[2]), .en(en), .y(y[2]), .on(on[2]));
  redir_mux #(.OWN(DIR_W)) dw (.side(side), .code(code[3]), .en(en), .y(y[3]), .on(on[3]));

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
    int others [3];
    logic exp;
    for (int rep = 0; rep < 400; rep++) begin
      side = 16'($urandom);
      en   = ($urandom % 8) != 0;
      for (int o = 0; o < 4; o++) code[o] = 4'($urandom % 11);
      #1;
      for (int o = 0; o < 4; o++) begin
        int n;
        n = 0;
        for (int s = 0; s < 4; s++) if (s != o) begin others[n] = s; n++; end
        if (!en || code[o] == 0 || code[o] > 9) exp = 1'b0;
        else begin
          int k, s, m;
          k = code[o] - 1; s = others[k / 3]; m = k % 3;
          exp = (m == 0) ? side[s].fz : (m == 1) ? side[s].sz : side[s].rd;
        end
        check($sformatf("y[%0d]", o), y[o], exp);
      end
    end
    // a signal on the facing side alone never comes out
    side = '0; side[DIR_E] = 4'b0111; en = 1'b1;
    for (int c = 0; c < 16; c++) begin
      code[1] = 4'(c); #1;
      check("own side blocked", y[1], 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
