// tb_row_decoder: checks the one-hot data-row decoder at its full size of
// 1016 word lines: every address with enable high raises exactly its own
// word line; enable low and out-of-range addresses raise none.
module tb_row_decoder;
  localparam int unsigned N = 1016;
  logic          en;
  logic [9:0]    addr;
  logic [N-1:0]  wl;

  int checks = 0;
  int failures = 0;

  row_decoder #(.N(N), .AW(10)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 1024; a++) begin
      for (int e = 0; e < 2; e++) begin
        en = 1'(e); addr = 10'(a); #1;
        checks++;
        if (e == 1 && a < int'(N)) begin
          if (!(wl[a] == 1'b1 && $countones(wl) == 1)) begin
            failures++;
            $display("FAIL addr=%0d count=%0d", a, $countones(wl));
          end
        end else if (wl != '0) begin
          failures++;
          $display("FAIL addr=%0d en=%0d raised %0d lines", a, e, $countones(wl));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
