// rl_tcam_entry: one word of the ratioless TCAM.
//
// WIDTH RL-TCAM cells share one word line; each compares its stored ternary
// value with its own pair of search lines, and the hierarchical-AND matching
// comparator (hamc) embedded in the entry reduces the cell results to the
// entry's static match line. There is no precharge phase: ml follows the
// stored data and the search lines combinationally.
//
// Ports: clk, wl (word line), bl[WIDTH] (bit-line pairs), sl/slb[WIDTH]
// (search lines), ml (1 when every cell of the entry matches).
module rl_tcam_entry
  import tcam_pkg::*;
#(
  parameter int unsigned WIDTH = TCAM_WIDTH
) (
  input  logic                   clk,
  input  logic                   wl,
  input  cell_code_t [WIDTH-1:0] bl,
  input  logic       [WIDTH-1:0] sl,
  input  logic       [WIDTH-1:0] slb,
  output logic                   ml
);

  logic [WIDTH-1:0] cell_match;

  for (genvar i = 0; i < WIDTH; i++) begin : g_cell
    rl_tcam_cell u_cell (
      .clk  (clk),
      .wl   (wl),
      .bl   (bl[i]),
      .sl   (sl[i]),
      .slb  (slb[i]),
      .match(cell_match[i])
    );
  end

  hamc #(.N(WIDTH)) u_hamc (
    .in (cell_match),
    .out(ml)
  );

endmodule
