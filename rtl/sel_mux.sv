// Single-level select multiplexer with a built-in select decoder.
//
// Models the new current-mode multiplexer: every input has its own
// transistor pair hanging from one current tree, and a (CMOS) decoder turns
// on exactly one pair after configuration. Because all branches sit on a
// single level, the mux can have any number of inputs, and because the
// decoder can also turn every branch off, the whole mux can be switched off.
//
// Interface: `code` is the encoded select. Input i is passed when en is high
// and code == i + BASE. Any other code, or en low, turns the mux off: `on` is
// low and `y` is 0 (no current, no signal). Purely combinational.
// The decoder-plus-one-hot structure follows the original design; BASE, the "off" code
// and the value 0 for an off output are this design's choices.
module sel_mux #(
  parameter int unsigned N    = 4,
  parameter int unsigned BASE = 0,
  parameter int unsigned W    = $clog2(N + BASE)
) (
  input  logic [W-1:0] code,
  input  logic         en,
  input  logic [N-1:0] d,
  output logic         y,
  output logic         on
);

  logic [N-1:0] branch;  // one-hot branch enables from the decoder

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      branch[i] = en && (32'(code) == i + BASE);
    end
  end

  assign y  = |(branch & d);
  assign on = |branch;

endmodule
