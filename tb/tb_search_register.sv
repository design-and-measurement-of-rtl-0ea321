// tb_search_register: self-checking test of the search register.
// Checks reset, key capture on search_en, holding without search_en,
// complementary search lines and the one-cycle valid flag.
module tb_search_register;
  localparam int W = 36;

  logic clk = 1'b0;
  logic rst_n, search_en, valid;
  logic [W-1:0] key, sl, slb, exp_key;
  int checks = 0, failures = 0;

  search_register dut (.clk(clk), .rst_n(rst_n), .search_en(search_en), .key(key),
                       .sl(sl), .slb(slb), .valid(valid));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic exp_valid);
    checks++;
    if (sl !== exp_key || slb !== ~exp_key || valid !== exp_valid) begin
      failures++;
      $display("FAIL sl=%h slb=%h valid=%b exp key=%h valid=%b", sl, slb, valid, exp_key, exp_valid);
    end
  endtask

  initial begin
    rst_n = 1'b0; search_en = 1'b0; key = '1; exp_key = '0;
    repeat (2) @(negedge clk);
    check(1'b0);
    rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      logic en;
      en = $urandom_range(1);
      @(negedge clk);
      search_en = en;
      key = W'({$urandom(), $urandom()});
      if (en) exp_key = key;
      @(negedge clk);
      search_en = 1'b0;
      check(en);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
