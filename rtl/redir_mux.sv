// 9:1 redirection multiplexer of the CLB.
//
// Passes one signal arriving from a neighbour on to the neighbour on side
// OWN. Its nine inputs are the FZ, SZ and redirection signals of the three
// other sides (never FastLANE, and never the side it faces, since sending a
// signal back where it came from wastes routing). Code 0 turns it off
// (output 0); code k = 1..9 passes input k-1, input index = slot*3 + member,
// slots being the other sides in N, E, S, W order, member FZ, SZ, RD.
// The input set follows the original design; the code format is this design's own.
// Combinational.
module redir_mux
  import fpga_pkg::*;
#(
  parameter dir_e OWN = DIR_E
) (
  input  side_in_t [3:0] side,
  input  logic [3:0]     code,
  input  logic           en,
  output logic           y,
  output logic           on
);

  logic [8:0] d;

  always_comb begin
    int unsigned slot;
    slot = 0;
    d    = '0;
    for (int unsigned s = 0; s < 4; s++) begin
      if (s != int'(OWN)) begin
        d[slot*3 + 0] = side[s].fz;
        d[slot*3 + 1] = side[s].sz;
        d[slot*3 + 2] = side[s].rd;
        slot++;
      end
    end
  end

  sel_mux #(.N(9), .BASE(1), .W(4)) u_mux (
    .code (code),
    .en   (en),
    .d    (d),
    .y    (y),
    .on   (on)
  );

endmodule
