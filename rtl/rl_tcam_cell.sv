// rl_tcam_cell: one ratioless ternary CAM cell (24-transistor RL-TCAM cell).
//
// The cell holds two storage bits, X and Y (see tcam_pkg for their meaning),
// each in a ratioless static storage element. On silicon each storage bit is
// the ratioless 12-transistor SRAM cell with its read bit-line driver removed
// (8 transistors per bit): since a TCAM cell is never read at speed and has no
// half-select state, only the write path and the storage remain. Here that
// storage is a pair of flip-flops written on the rising clock edge while the
// word line is high; when it is low they hold.
//
// The comparator is fully static and complementary: match is 1 unless the
// stored value disagrees with the search bit, i.e.
//   match = ~((X & slb) | (Y & sl))
// where sl/slb are the complementary search lines. With both storage bits
// clear the cell is a don't-care and always matches.
//
// Ports: clk, wl (word line, write enable of this row), bl (bit-line pair
// carrying the value to store), sl/slb (search lines), match (cell result,
// combinational from the stored bits and search lines).
// The storage bits have no reset, like SRAM: every entry must be written
// before its match output means anything.
module rl_tcam_cell
  import tcam_pkg::*;
(
  input  logic       clk,
  input  logic       wl,
  input  cell_code_t bl,
  input  logic       sl,
  input  logic       slb,
  output logic       match
);

  cell_code_t stored;

  always_ff @(posedge clk) begin
    if (wl) stored <= bl;
  end

  always_comb match = ~((stored.x & slb) | (stored.y & sl));

endmodule
