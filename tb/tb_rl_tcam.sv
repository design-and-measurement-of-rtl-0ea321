// tb_rl_tcam: end-to-end self-checking test of the RL-TCAM at its default
// size (36 bits x 32 entries).
//
// Phase 1 fills all entries with randomly generated ternary data and applies
// random search keys and keys copied from stored entries. Phase 2 loads a
// longest-prefix table (entry e holds a prefix of 36-e cared bits, so longer
// prefixes have higher priority) and searches it. Phase 3 mixes writes and
// searches in the same cycle and repeats one key without a new search.
// Every result is compared with a software model one cycle after the search
// (the design's latency), and the testbench counts how often each behaviour
// occurred: single hit, multiple hits resolved by priority, miss, a match
// that needed a don't-care cell, write and search in one cycle, and a held
// key re-evaluated after a write. A behaviour that never occurred is a
// failure.
module tb_rl_tcam;
  localparam int W  = 36;
  localparam int E  = 32;
  localparam int AW = 5;

  logic clk = 1'b0;
  logic rst_n, we, search_en, valid, hit;
  logic [AW-1:0] waddr, hit_addr;
  logic [W-1:0] wdata, wcare, key;
  logic [E-1:0] match;

  logic [W-1:0] d [E];
  logic [W-1:0] c [E];
  logic [W-1:0] cur_key;

  int checks = 0, failures = 0;
  int n_single = 0, n_multi = 0, n_miss = 0, n_dontcare = 0;
  int n_wr_and_search = 0, n_held_key = 0, n_lpm = 0;

  rl_tcam dut (
    .clk(clk), .rst_n(rst_n),
    .we(we), .waddr(waddr), .wdata(wdata), .wcare(wcare),
    .search_en(search_en), .key(key),
    .valid(valid), .match(match), .hit(hit), .hit_addr(hit_addr)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd();
    return W'({$urandom(), $urandom()});
  endfunction

  // Compare all outputs with the model for cur_key; expect_valid says
  // whether a search was issued in the previous cycle.
  task automatic check_result(logic expect_valid);
    logic [E-1:0] exp;
    int first;
    bit dc;
    first = -1;
    dc = 0;
    for (int e = 0; e < E; e++) begin
      exp[e] = ((cur_key ^ d[e]) & c[e]) == '0;
      if (exp[e] && first < 0) first = e;
      if (exp[e] && c[e] != '1) dc = 1;
    end
    checks++;
    if (valid !== expect_valid || match !== exp || hit !== (first >= 0) ||
        (first >= 0 && hit_addr !== AW'(first))) begin
      failures++;
      $display("FAIL key=%h valid=%b match=%h exp=%h hit=%b addr=%0d exp_addr=%0d",
               cur_key, valid, match, exp, hit, hit_addr, first);
    end
    if ($countones(exp) == 1) n_single++;
    if ($countones(exp) > 1) n_multi++;
    if (exp == '0) n_miss++;
    if (dc) n_dontcare++;
  endtask

  task automatic idle_inputs();
    we = 1'b0; search_en = 1'b0;
    wdata = rnd(); wcare = rnd(); waddr = AW'($urandom()); key = rnd();
  endtask

  task automatic write_entry(int e, logic [W-1:0] data, logic [W-1:0] care);
    @(negedge clk);
    idle_inputs();
    we = 1'b1; waddr = AW'(e); wdata = data; wcare = care;
    d[e] = data; c[e] = care;
    @(negedge clk);
    idle_inputs();
  endtask

  task automatic do_search(logic [W-1:0] k);
    @(negedge clk);
    idle_inputs();
    search_en = 1'b1; key = k; cur_key = k;
    @(negedge clk);
    idle_inputs();
    check_result(1'b1);
  endtask

  // key agreeing with entry e on its cared bits, random elsewhere
  function automatic logic [W-1:0] key_for(int e);
    return (d[e] & c[e]) | (rnd() & ~c[e]);
  endfunction

  initial begin
    rst_n = 1'b0;
    idle_inputs();
    cur_key = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Phase 1: random ternary data and random keys
    for (int e = 0; e < E; e++) begin
      logic [W-1:0] care;
      care = rnd() | rnd() | rnd();  // mostly cared bits
      if (e % 8 == 3) care = '1;     // some exact entries
      write_entry(e, rnd(), care);
    end
    // no search issued since reset: valid must be low
    @(negedge clk);
    checks++;
    if (valid !== 1'b0) begin
      failures++;
      $display("FAIL valid high without search");
    end
    for (int t = 0; t < 300; t++) begin
      if (t % 2 == 0) do_search(key_for($urandom_range(E - 1)));
      else do_search(rnd());
    end

    // Phase 2: longest-prefix table, prefixes nested so several entries match
    begin
      logic [W-1:0] base;
      base = rnd();
      for (int e = 0; e < E; e++) begin
        logic [W-1:0] pfx_care;
        pfx_care = ~(W'(0)) << e;               // top 36-e bits cared
        write_entry(e, (e % 4 == 0) ? base : rnd(), pfx_care);
      end
      for (int t = 0; t < 300; t++) begin
        logic [W-1:0] k;
        int len;
        len = $urandom_range(W);
        k = (base & (~(W'(0)) << (W - len))) | (rnd() & ~(~(W'(0)) << (W - len)));
        do_search(k);
        if (hit && $countones(match) > 1) n_lpm++;
      end
    end

    // Phase 3: write and search in the same cycle, then a held key
    for (int t = 0; t < 100; t++) begin
      int e;
      logic [W-1:0] k, nd, nc;
      e = $urandom_range(E - 1);
      nd = rnd(); nc = rnd() | rnd();
      k = (t % 2) ? ((nd & nc) | (rnd() & ~nc)) : rnd();
      @(negedge clk);
      idle_inputs();
      we = 1'b1; waddr = AW'(e); wdata = nd; wcare = nc;
      search_en = 1'b1; key = k;
      d[e] = nd; c[e] = nc; cur_key = k;
      @(negedge clk);
      idle_inputs();
      check_result(1'b1);
      n_wr_and_search++;
      // rewrite the entry with the key held: match follows the new contents
      nd = rnd(); nc = (t % 3 == 0) ? '0 : rnd();
      we = 1'b1; waddr = AW'(e); wdata = nd; wcare = nc;
      d[e] = nd; c[e] = nc;
      @(negedge clk);
      idle_inputs();
      check_result(1'b0);
      n_held_key++;
    end

    $display("events: single=%0d multi=%0d miss=%0d dontcare=%0d lpm=%0d wr_and_search=%0d held_key=%0d",
             n_single, n_multi, n_miss, n_dontcare, n_lpm, n_wr_and_search, n_held_key);
    if (n_single == 0)        begin failures++; $display("FAIL no single hit"); end
    if (n_multi == 0)         begin failures++; $display("FAIL no multiple hit"); end
    if (n_miss == 0)          begin failures++; $display("FAIL no miss"); end
    if (n_dontcare == 0)      begin failures++; $display("FAIL no don't-care match"); end
    if (n_lpm == 0)           begin failures++; $display("FAIL no longest-prefix resolution"); end
    if (n_wr_and_search == 0) begin failures++; $display("FAIL no write+search cycle"); end
    if (n_held_key == 0)      begin failures++; $display("FAIL no held-key check"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
