// rl_tcam_array: the RL-TCAM cell array, ENTRIES words of WIDTH ternary cells.
//
// Bit lines and search lines run vertically through all entries; each entry
// has its own word line and its own static match line. A write stores the
// bit-line values into the one entry whose word line is high, on the rising
// clock edge. Match lines are combinational from stored data and search lines.
//
// Ports: clk, wl[ENTRIES] (one-hot word lines), bl[WIDTH] (bit-line pairs),
// sl/slb[WIDTH] (search lines), ml[ENTRIES] (match lines).
module rl_tcam_array
  import tcam_pkg::*;
#(
  parameter int unsigned WIDTH   = TCAM_WIDTH,
  parameter int unsigned ENTRIES = TCAM_ENTRIES
) (
  input  logic                     clk,
  input  logic       [ENTRIES-1:0] wl,
  input  cell_code_t [WIDTH-1:0]   bl,
  input  logic       [WIDTH-1:0]   sl,
  input  logic       [WIDTH-1:0]   slb,
  output logic       [ENTRIES-1:0] ml
);

  for (genvar e = 0; e < ENTRIES; e++) begin : g_entry
    rl_tcam_entry #(.WIDTH(WIDTH)) u_entry (
      .clk(clk),
      .wl (wl[e]),
      .bl (bl),
      .sl (sl),
      .slb(slb),
      .ml (ml[e])
    );
  end

endmodule
