// tb_hamc: self-checking test of the hierarchical-AND matching comparator.
// Checks the 36-input default and a 5-input instance (uneven split) with
// all-ones, every single-zero pattern and random vectors.
module tb_hamc;
  logic [35:0] in36;
  logic        out36;
  logic [4:0]  in5;
  logic        out5;
  int checks = 0, failures = 0;

  hamc            dut36 (.in(in36), .out(out36));
  hamc #(.N(5))   dut5  (.in(in5),  .out(out5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check36(logic [35:0] v);
    in36 = v; #1;
    checks++;
    if (out36 !== (v == '1)) begin
      failures++;
      $display("FAIL in36=%h out=%b", v, out36);
    end
  endtask

  task automatic check5(logic [4:0] v);
    in5 = v; #1;
    checks++;
    if (out5 !== (v == '1)) begin
      failures++;
      $display("FAIL in5=%b out=%b", v, out5);
    end
  endtask

  initial begin
    check36('1);
    check36('0);
    for (int i = 0; i < 36; i++) check36(~(36'd1 << i));
    for (int i = 0; i < 200; i++) check36({$urandom(), $urandom()} >> 28);
    for (int i = 0; i < 32; i++) check5(5'(i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
