// tb_rl_tcam_cell: self-checking test of one RL-TCAM cell.
// Writes each of the four storage codes, checks the match output against
// both search values, and checks that the cell holds its contents while the
// word line is low.
module tb_rl_tcam_cell;
  import tcam_pkg::*;

  logic clk = 1'b0;
  logic wl, sl, slb, match;
  cell_code_t bl;
  int checks = 0, failures = 0;

  rl_tcam_cell dut (.clk(clk), .wl(wl), .bl(bl), .sl(sl), .slb(slb), .match(match));

  always #5 clk = ~clk;

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected match of a stored code against search bit s
  function automatic logic expect_match(cell_code_t c, logic s);
    if (c.x && c.y) return 1'b0;   // blocked cell
    if (!c.x && !c.y) return 1'b1; // don't care
    return c.x == s;
  endfunction

  task automatic write_code(cell_code_t c);
    @(negedge clk);
    wl = 1'b1; bl = c;
    @(negedge clk);
    wl = 1'b0; bl = ~c;
  endtask

  task automatic check_search(cell_code_t c);
    for (int s = 0; s < 2; s++) begin
      sl = s[0]; slb = ~s[0];
      #1;
      checks++;
      if (match !== expect_match(c, s[0])) begin
        failures++;
        $display("FAIL code=%b s=%0d match=%b", c, s, match);
      end
    end
  endtask

  initial begin
    wl = 1'b0; bl = '0; sl = 1'b0; slb = 1'b1;
    for (int k = 0; k < 4; k++) begin
      cell_code_t c;
      c = cell_code_t'(k[1:0]);
      write_code(c);
      check_search(c);
      // word line low with other data on the bit lines: contents must hold
      repeat (2) @(negedge clk);
      check_search(c);
    end
    // encoding helper: data/care pairs
    for (int k = 0; k < 4; k++) begin
      cell_code_t c;
      c = encode_ternary(k[0], k[1]);
      write_code(c);
      for (int s = 0; s < 2; s++) begin
        sl = s[0]; slb = ~s[0];
        #1;
        checks++;
        if (match !== (!k[1] || (k[0] == s[0]))) begin
          failures++;
          $display("FAIL data=%0d care=%0d s=%0d match=%b", k[0], k[1], s, match);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
