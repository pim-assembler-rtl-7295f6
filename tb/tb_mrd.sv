// tb_mrd: exhaustive test of the modified row decoder of the computation rows.
// Every combination of up to three 3-bit addresses and row count is applied;
// the expected word-line set is built as the union of one-hot codes.
module tb_mrd;
  logic            en;
  logic [1:0]      nrows;
  logic [2:0][2:0] addr;
  logic [7:0]      wl;

  int checks = 0;
  int failures = 0;

  mrd dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int n = 0; n < 4; n++)
        for (int a0 = 0; a0 < 8; a0++)
          for (int a1 = 0; a1 < 8; a1++)
            for (int a2 = 0; a2 < 8; a2++) begin
              logic [7:0] exp;
              en = 1'(e); nrows = 2'(n);
              addr[0] = 3'(a0); addr[1] = 3'(a1); addr[2] = 3'(a2);
              exp = '0;
              if (e == 1) begin
                if (n >= 1) exp |= 8'(1) << a0;
                if (n >= 2) exp |= 8'(1) << a1;
                if (n >= 3) exp |= 8'(1) << a2;
              end
              #1;
              checks++;
              if (wl !== exp) begin
                failures++;
                $display("FAIL en=%0d n=%0d a=%0d,%0d,%0d wl=%b exp=%b", e, n, a0, a1, a2, wl, exp);
              end
            end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
