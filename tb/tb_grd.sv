// tb_grd: exhaustive test of the MAT's global row decoder for eight
// sub-arrays: single-target decode, broadcast to all, and nothing enabled
// without valid.
module tb_grd;
  logic       valid, all;
  logic [2:0] sel;
  logic [7:0] en;

  int checks = 0;
  int failures = 0;

  grd #(.NSUB(8)) dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2; v++)
      for (int a = 0; a < 2; a++)
        for (int s = 0; s < 8; s++) begin
          logic [7:0] exp;
          valid = 1'(v); all = 1'(a); sel = 3'(s);
          exp = (v == 0) ? 8'h00 : (a == 1) ? 8'hff : 8'(1) << s;
          #1;
          checks++;
          if (en !== exp) begin
            failures++;
            $display("FAIL valid=%0d all=%0d sel=%0d en=%b exp=%b", v, a, s, en, exp);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
