// tb_rl_tcam_entry: self-checking test of one 36-bit RL-TCAM entry.
// Writes random ternary words and searches each with keys that must match
// (non-care bits randomised), keys with one cared bit flipped (must miss)
// and random keys, then flips every column of an exact word, comparing the match line with a software model.
module tb_rl_tcam_entry;
  import tcam_pkg::*;
  localparam int W = 36;

  logic clk = 1'b0;
  logic wl, ml;
  cell_code_t [W-1:0] bl;
  logic [W-1:0] sl, slb;
  int checks = 0, failures = 0;

  rl_tcam_entry dut (.clk(clk), .wl(wl), .bl(bl), .sl(sl), .slb(slb), .ml(ml));

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

  logic [W-1:0] d, c;

  task automatic search(logic [W-1:0] key);
    sl = key; slb = ~key;
    #1;
    checks++;
    if (ml !== (((key ^ d) & c) == '0)) begin
      failures++;
      $display("FAIL d=%h c=%h key=%h ml=%b", d, c, key, ml);
    end
  endtask

  initial begin
    wl = 1'b0; bl = '0; sl = '0; slb = '1;
    for (int t = 0; t < 300; t++) begin
      d = rnd();
      c = (t % 3 == 0) ? ~(W'(0)) : rnd();
      if (t % 7 == 0) c = '0;  // all don't care
      @(negedge clk);
      wl = 1'b1;
      for (int i = 0; i < W; i++) bl[i] = encode_ternary(d[i], c[i]);
      @(negedge clk);
      wl = 1'b0;
      bl = '1;
      search((d & c) | (rnd() & ~c));
      if (c != '0) begin
        int b;
        do b = $urandom_range(W - 1); while (!c[b]);
        search(d ^ (W'(1) << b));
      end
      search(rnd());
    end
    // exact word: flipping any single column must break the match
    d = rnd(); c = '1;
    @(negedge clk);
    wl = 1'b1;
    for (int i = 0; i < W; i++) bl[i] = encode_ternary(d[i], c[i]);
    @(negedge clk);
    wl = 1'b0;
    search(d);
    for (int i = 0; i < W; i++) search(d ^ (W'(1) << i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
