// Configuration memory of one basic cell.
//
// A 41-bit shift register is loaded serially (one bit per rising edge of the
// configuration clock, entering at bit 0 and leaving at bit 40 as `sdo` for
// the next cell of the chain). Two 41-bit memory banks can each copy the
// shift register in parallel: while bank_en[k] is high at a clock edge,
// bank k takes the shift register's contents as they were before that edge.
// mem_sel picks which bank configures the cell, so two applications
// (personalities) can be held and switched between without reloading.
// The structure (shift register, two banks, bank enables, memory select)
// follows the original design; the edge-triggered bank write and the reset to an
// all-zero (cell off) configuration, also used as the power-up value, are
// this design's choices.
module cfg_memory
  import fpga_pkg::*;
(
  input  logic       cfg_clk,
  input  logic       rst_n,
  input  logic       sdi,
  output logic       sdo,
  input  logic [1:0] bank_en,
  input  logic       mem_sel,
  output cfg_t       cfg
);

  // Power-up value: all zero, so every cell is off until it is configured.
  logic [CFG_BITS-1:0] sr = '0;
  logic [CFG_BITS-1:0] bank [2] = '{default: '0};

  always_ff @(posedge cfg_clk or negedge rst_n) begin
    if (!rst_n) begin
      sr      <= '0;
      bank[0] <= '0;
      bank[1] <= '0;
    end else begin
      sr <= {sr[CFG_BITS-2:0], sdi};
      if (bank_en[0]) bank[0] <= sr;
      if (bank_en[1]) bank[1] <= sr;
    end
  end

  assign sdo = sr[CFG_BITS-1];
  assign cfg = cfg_t'(bank[mem_sel]);

endmodule
