// tb_rl_tcam_array: self-checking test of the 32 x 36 RL-TCAM cell array.
// Writes every entry through one-hot word lines, then checks all 32 match
// lines for keys copied from entries and random keys, then rewrites single
// entries and checks that only those entries change.
module tb_rl_tcam_array;
  import tcam_pkg::*;
  localparam int W = 36;
  localparam int E = 32;

  logic clk = 1'b0;
  logic [E-1:0] wl, ml;
  cell_code_t [W-1:0] bl;
  logic [W-1:0] sl, slb;
  logic [W-1:0] d [E];
  logic [W-1:0] c [E];
  int checks = 0, failures = 0;

  rl_tcam_array dut (.clk(clk), .wl(wl), .bl(bl), .sl(sl), .slb(slb), .ml(ml));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd();
    return W'({$urandom(), $urandom()});
  endfunction

  task automatic write_entry(int e, logic [W-1:0] data, logic [W-1:0] care);
    d[e] = data; c[e] = care;
    @(negedge clk);
    wl = E'(1) << e;
    for (int i = 0; i < W; i++) bl[i] = encode_ternary(data[i], care[i]);
    @(negedge clk);
    wl = '0;
  endtask

  task automatic search(logic [W-1:0] key);
    logic [E-1:0] exp;
    sl = key; slb = ~key;
    #1;
    for (int e = 0; e < E; e++) exp[e] = ((key ^ d[e]) & c[e]) == '0;
    checks++;
    if (ml !== exp) begin
      failures++;
      $display("FAIL key=%h ml=%h exp=%h", key, ml, exp);
    end
  endtask

  initial begin
    wl = '0; bl = '0; sl = '0; slb = '1;
    for (int e = 0; e < E; e++) write_entry(e, rnd(), rnd() | rnd());
    for (int t = 0; t < 200; t++) begin
      int e = $urandom_range(E - 1);
      search(d[e]);
      search(rnd());
    end
    for (int t = 0; t < 50; t++) begin
      int e = $urandom_range(E - 1);
      write_entry(e, rnd(), (t % 5 == 0) ? W'(0) : rnd());
      search(d[e]);
      search(rnd());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
