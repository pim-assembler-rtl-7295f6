// tb_dpu: checks the DPU's AND reduction of XNOR2 result rows.
// Rows that are all ones (k-mer match) and rows with one or more zeros
// (mismatch) are offered to random sub-arrays; only strobes carrying the
// XNOR2 enable set may update a flag, one cycle later, with match_valid.
module tb_dpu;
  import pim_pkg::*;

  localparam int unsigned NSUB = 4;
  localparam int unsigned NC   = 64;

  logic                      clk = 1'b0;
  logic                      rst_n = 1'b0;
  logic [NSUB-1:0]           sensed;
  sa_en_t [NSUB-1:0]         en;
  logic [NSUB-1:0][NC-1:0]   row;
  logic [NSUB-1:0]           match, match_valid;

  int checks = 0;
  int failures = 0;

  dpu #(.NSUB(NSUB), .NCOLS(NC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [NSUB-1:0] exp_match, exp_valid;

  initial begin
    sensed = '0; en = '0; row = '0;
    exp_match = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 500; it++) begin
      @(negedge clk);
      exp_valid = '0;
      for (int s = 0; s < int'(NSUB); s++) begin
        int kind;
        kind = int'($urandom_range(0, 3));
        row[s] = '1;
        if (kind >= 2) begin
          row[s][$urandom_range(0, NC - 1)] = 1'b0;
          if (kind == 3) row[s] = {$urandom, $urandom};
        end
        sensed[s] = ($urandom_range(0, 2) != 0);
        en[s] = ($urandom_range(0, 3) == 0) ? sa_enables(SA_SUM) : sa_enables(SA_XNOR);
        if (sensed[s] && en[s] == sa_enables(SA_XNOR)) begin
          exp_valid[s] = 1'b1;
          exp_match[s] = &row[s];
        end
      end
      @(negedge clk);
      sensed = '0;
      checks += 2;
      if (match_valid !== exp_valid) begin failures++; $display("FAIL valid %b exp %b", match_valid, exp_valid); end
      if (match !== exp_match) begin failures++; $display("FAIL match %b exp %b", match, exp_match); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
