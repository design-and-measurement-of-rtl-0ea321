// row_decoder: decodes the write address into one-hot word lines.
//
// While we is high, word line addr is raised and all others stay low; while
// we is low every word line is low, so the array holds its contents. An
// address beyond ENTRIES-1 selects nothing. Purely combinational.
module row_decoder #(
  parameter int unsigned ENTRIES = tcam_pkg::TCAM_ENTRIES,
  parameter int unsigned AW      = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic               we,
  input  logic [AW-1:0]      addr,
  output logic [ENTRIES-1:0] wl
);

  always_comb begin
    for (int unsigned e = 0; e < ENTRIES; e++) begin
      wl[e] = we && (addr == AW'(e));
    end
  end

endmodule
