// write_driver: the write peripheral feeding the array's bit lines.
//
// Write data arrive as two words, data and care: a column with care=0 is
// stored as 'X' (don't care), otherwise as the data bit. Each column's
// bit-line pair is driven with the (X, Y) code of tcam_pkg::encode_ternary.
// The data/care interface is this design's choice. Purely combinational;
// the bit lines only matter while a word line is high.
module write_driver
  import tcam_pkg::*;
#(
  parameter int unsigned WIDTH = TCAM_WIDTH
) (
  input  logic       [WIDTH-1:0] data,
  input  logic       [WIDTH-1:0] care,
  output cell_code_t [WIDTH-1:0] bl
);

  always_comb begin
    for (int unsigned i = 0; i < WIDTH; i++) begin
      bl[i] = encode_ternary(data[i], care[i]);
    end
  end

endmodule
