// tb_row_decoder: exhaustive self-checking test of the row decoder.
module tb_row_decoder;
  logic we;
  logic [4:0] addr;
  logic [31:0] wl;
  logic [2:0] addr6;
  logic [5:0] wl6;
  int checks = 0, failures = 0;

  row_decoder dut (.we(we), .addr(addr), .wl(wl));
  row_decoder #(.ENTRIES(6)) dut6 (.we(we), .addr(addr6), .wl(wl6));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 2; w++) begin
      for (int a = 0; a < 32; a++) begin
        we = w[0]; addr = 5'(a); addr6 = 3'(a);
        #1;
        checks++;
        if (wl !== (w[0] ? 32'd1 << a : 32'd0)) begin
          failures++;
          $display("FAIL we=%0d addr=%0d wl=%h", w, a, wl);
        end
        if (a < 8) begin
          checks++;
          if (wl6 !== ((w[0] && a < 6) ? 6'd1 << a : 6'd0)) begin
            failures++;
            $display("FAIL6 we=%0d addr=%0d wl=%b", w, a, wl6);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
