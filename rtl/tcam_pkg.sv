// tcam_pkg: sizes and types shared by the ratioless ternary CAM (RL-TCAM).
//
// The array is 36 bits wide and 32 entries deep, as on the published test
// chip. Each ternary cell is held as a pair of storage bits (X, Y):
//   X=1 Y=0 : stored '1'      X=0 Y=1 : stored '0'
//   X=0 Y=0 : stored 'X' (don't care, matches both search values)
//   X=1 Y=1 : matches nothing (never written by write_driver)
// A cell mismatches when (X and not S) or (Y and S), where S is the search
// bit. This particular pair encoding is this design's own choice; the source
// only says that a TCAM cell stores '0', '1' and 'X' in two storage bits.
package tcam_pkg;

  localparam int unsigned TCAM_WIDTH   = 36;  // bits per entry
  localparam int unsigned TCAM_ENTRIES = 32;  // entries

  // Contents of one ternary cell as held in its two storage bits.
  typedef struct packed {
    logic x;  // set when the stored value is '1'
    logic y;  // set when the stored value is '0'
  } cell_code_t;

  // Encode one ternary symbol given as (data, care) into the cell pair.
  function automatic cell_code_t encode_ternary(input logic data, input logic care);
    cell_code_t c;
    c.x = care & data;
    c.y = care & ~data;
    return c;
  endfunction

endpackage
