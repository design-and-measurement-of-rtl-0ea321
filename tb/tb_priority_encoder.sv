// tb_priority_encoder: self-checking test of the 32-input priority encoder.
// Checks no-hit, every single match line, and random multi-hit patterns
// (lowest-numbered entry wins).
module tb_priority_encoder;
  logic [31:0] ml;
  logic hit;
  logic [4:0] addr;
  int checks = 0, failures = 0;

  priority_encoder dut (.ml(ml), .hit(hit), .addr(addr));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] v);
    int exp_a;
    ml = v; #1;
    exp_a = 0;
    for (int i = 0; i < 32; i++) if (v[i]) begin exp_a = i; break; end
    checks++;
    if (hit !== (v != 0) || addr !== 5'(exp_a)) begin
      failures++;
      $display("FAIL ml=%h hit=%b addr=%0d exp=%0d", v, hit, addr, exp_a);
    end
  endtask

  initial begin
    check('0);
    for (int i = 0; i < 32; i++) check(32'd1 << i);
    for (int i = 0; i < 32; i++) check(32'hFFFF_FFFF << i);
    for (int i = 0; i < 300; i++) check($urandom() & $urandom());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
