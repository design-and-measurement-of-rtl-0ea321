// tb_write_driver: self-checking test of the write peripheral encoding.
// Each column must carry X=1,Y=0 for a cared '1', X=0,Y=1 for a cared '0'
// and X=0,Y=0 for a don't-care column.
module tb_write_driver;
  import tcam_pkg::*;
  localparam int W = 36;

  logic [W-1:0] data, care;
  cell_code_t [W-1:0] bl;
  int checks = 0, failures = 0;

  write_driver dut (.data(data), .care(care), .bl(bl));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      data = W'({$urandom(), $urandom()});
      care = W'({$urandom(), $urandom()});
      #1;
      for (int i = 0; i < W; i++) begin
        logic ex, ey;
        ex = care[i] ? data[i] : 1'b0;
        ey = care[i] ? !data[i] : 1'b0;
        checks++;
        if (bl[i].x !== ex || bl[i].y !== ey) begin
          failures++;
          $display("FAIL col %0d data=%b care=%b bl=%b", i, data[i], care[i], bl[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
