// rl_tcam: fully digital ternary CAM built from ratioless cells (RL-TCAM).
//
// A WIDTH x ENTRIES ternary CAM (36 x 32 by default, as on the test chip)
// whose match path is entirely static CMOS logic: ratioless storage cells,
// a complementary comparator in every cell and a hierarchical-AND matching
// comparator per entry instead of a precharged match line and sense amplifier.
// Blocks: write_driver and row_decoder store ternary words into the cell
// array; search_register holds the key and drives the search lines; the
// array's match lines go to priority_encoder.
//
// Write: we, waddr, wdata, wcare sampled at a rising edge; the entry is
//   updated at that edge (care=0 columns become don't-care).
// Search: search_en with key at a rising edge; in the following cycle
//   valid=1 and match[ENTRIES-1:0], hit and hit_addr hold the result for that
//   key. The results stay combinationally tied to the search register and the
//   stored data, so a write to an entry shows up in match one cycle later
//   even without a new search. Writes and searches may happen in the same
//   cycle; the search then sees the contents from before the write.
// Entries have no reset (SRAM): write all entries before trusting match.
module rl_tcam
  import tcam_pkg::*;
#(
  parameter int unsigned WIDTH   = TCAM_WIDTH,
  parameter int unsigned ENTRIES = TCAM_ENTRIES,
  parameter int unsigned AW      = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // write port
  input  logic               we,
  input  logic [AW-1:0]      waddr,
  input  logic [WIDTH-1:0]   wdata,
  input  logic [WIDTH-1:0]   wcare,
  // search port
  input  logic               search_en,
  input  logic [WIDTH-1:0]   key,
  output logic               valid,
  output logic [ENTRIES-1:0] match,
  output logic               hit,
  output logic [AW-1:0]      hit_addr
);

  cell_code_t [WIDTH-1:0]   bl;
  logic       [ENTRIES-1:0] wl;
  logic       [WIDTH-1:0]   sl, slb;

  write_driver #(.WIDTH(WIDTH)) u_wdrv (
    .data(wdata),
    .care(wcare),
    .bl  (bl)
  );

  row_decoder #(.ENTRIES(ENTRIES), .AW(AW)) u_rdec (
    .we  (we),
    .addr(waddr),
    .wl  (wl)
  );

  search_register #(.WIDTH(WIDTH)) u_sreg (
    .clk      (clk),
    .rst_n    (rst_n),
    .search_en(search_en),
    .key      (key),
    .sl       (sl),
    .slb      (slb),
    .valid    (valid)
  );

  rl_tcam_array #(.WIDTH(WIDTH), .ENTRIES(ENTRIES)) u_array (
    .clk(clk),
    .wl (wl),
    .bl (bl),
    .sl (sl),
    .slb(slb),
    .ml (match)
  );

  priority_encoder #(.ENTRIES(ENTRIES), .AW(AW)) u_pe (
    .ml  (match),
    .hit (hit),
    .addr(hit_addr)
  );

endmodule
