// Testbench for input_mux: random side signals and codes for the 17:1 form
// (with feedback) and the 16:1 form; the expected output is read from the
// flat list of 16 side inputs (side*4 + member) or FD.
module tb_input_mux;
  import fpga_pkg::*;
  int checks = 0, failures = 0;

  side_in_t [3:0] side;
  logic fd, en;
  logic [4:0] code17, code16;
  logic y17, on17, y16, on16;

  input_mux #(.HAS_FD(1'b1)) dut17 (.side(side), .fd(fd), .code(code17), .en(en), .y(y17), .on(on17));
  input_mux #(.HAS_FD(1'b0)) dut16 (.side(side), .fd(fd), .code(code16), .en(en), .y(y16), .on(on16));

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b (code17=%0d code16=%0d)", what, got, exp, code17, code16);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] flat;
    logic exp17, exp16;
    for (int rep = 0; rep < 600; rep++) begin
      side   = 16'($urandom);
      fd     = 1'($urandom);
      en     = ($urandom % 8) != 0;
      code17 = 5'($urandom % 20);
      code16 = {1'b0, 4'($urandom)};
      for (int s = 0; s < 4; s++) begin
        flat[s*4+0] = side[s].fz;
        flat[s*4+1] = side[s].sz;
        flat[s*4+2] = side[s].rd;
        flat[s*4+3] = side[s].fl;
      end
      if (!en || code17 == 0 || code17 > 17) exp17 = 1'b0;
      else if (code17 == 17) exp17 = fd;
      else exp17 = flat[code17-1];
      exp16 = en ? flat[code16[3:0]] : 1'b0;
      #1;
      check("y17", y17, exp17);
      check("on17", on17, en && code17 >= 1 && code17 <= 17);
      check("y16", y16, exp16);
      check("on16", on16, en);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
