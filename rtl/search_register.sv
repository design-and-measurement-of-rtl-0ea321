// search_register: holds the search key and drives the search lines.
//
// When search_en is high at a rising clock edge the key is captured; the
// register then drives each column's complementary search-line pair
// (sl = key bit, slb = its inverse) until the next search. A valid flag,
// set by a search and cleared otherwise, marks the cycle whose match
// results belong to a new key. Reset clears the key and the flag. The valid
// flag and the reset value are this design's choices.
//
// Timing: key presented with search_en in cycle t; sl/slb and valid change
// after the edge ending cycle t, so results are read in cycle t+1.
module search_register #(
  parameter int unsigned WIDTH = tcam_pkg::TCAM_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             search_en,
  input  logic [WIDTH-1:0] key,
  output logic [WIDTH-1:0] sl,
  output logic [WIDTH-1:0] slb,
  output logic             valid
);

  logic [WIDTH-1:0] key_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_q <= '0;
      valid <= 1'b0;
    end else begin
      valid <= search_en;
      if (search_en) key_q <= key;
    end
  end

  always_comb begin
    sl  = key_q;
    slb = ~key_q;
  end

endmodule
