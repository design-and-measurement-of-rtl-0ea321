// priority_encoder: turns the match lines into a hit flag and an address.
//
// hit is 1 when any match line is high; addr is the lowest-numbered matching
// entry (entry 0 has the highest priority, so longest-prefix rules are stored
// from entry 0 downwards) and 0 when nothing matches. The priority order is
// this design's choice. Purely combinational.
module priority_encoder #(
  parameter int unsigned ENTRIES = tcam_pkg::TCAM_ENTRIES,
  parameter int unsigned AW      = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic [ENTRIES-1:0] ml,
  output logic               hit,
  output logic [AW-1:0]      addr
);

  always_comb begin
    hit  = 1'b0;
    addr = '0;
    for (int e = int'(ENTRIES) - 1; e >= 0; e--) begin
      if (ml[e]) begin
        hit  = 1'b1;
        addr = AW'(e);
      end
    end
  end

endmodule
