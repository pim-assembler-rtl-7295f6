// tb_grb: checks the global row buffer: the row of the source that pulses
// valid is captured and shown one cycle later with out_valid, and held
// while no source is valid.
module tb_grb;
  localparam int unsigned N  = 4;
  localparam int unsigned NC = 64;

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic [N-1:0]         in_valid;
  logic [N-1:0][NC-1:0] in_row;
  logic                 out_valid;
  logic [NC-1:0]        out_row;

  int checks = 0;
  int failures = 0;

  grb #(.N(N), .NCOLS(NC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [NC-1:0] held;
  logic          exp_v;

  initial begin
    in_valid = '0; in_row = '0; held = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 400; it++) begin
      @(negedge clk);
      for (int i = 0; i < int'(N); i++) in_row[i] = {$urandom, $urandom};
      in_valid = '0;
      exp_v = 1'b0;
      if ($urandom_range(0, 1) == 1) begin
        int s;
        s = int'($urandom_range(0, N - 1));
        in_valid[s] = 1'b1;
        held = in_row[s];
        exp_v = 1'b1;
      end
      @(negedge clk);
      in_valid = '0;
      checks += 2;
      if (out_valid !== exp_v) begin failures++; $display("FAIL out_valid"); end
      if (out_row !== held) begin failures++; $display("FAIL out_row %h exp %h", out_row, held); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
