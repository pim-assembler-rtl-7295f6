// tb_recfg_sa: self-checking test of the reconfigurable sense-amplifier row.
//
// Random cell values are drawn per bit-line for one, two or three raised
// cells; the expected bit-line value is computed directly from the cell
// values (cell value, XNOR2, majority, a ^ b ^ carry) rather than from the
// voltage thresholds the block uses. The carry latch is tracked in the
// testbench and checked after every clock, including latch reset and the
// rule that only a carry-mode sense loads it.
module tb_recfg_sa;
  import pim_pkg::*;

  localparam int unsigned W = 16;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         sense;
  sa_en_t       en;
  logic [1:0]   nrows;
  logic [W-1:0] cnt0, cnt1;
  logic         latch_rst;
  logic [W-1:0] bl, carry_q;

  int checks = 0;
  int failures = 0;

  recfg_sa #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  logic [W-1:0] a, b, c, carry_ref;

  task automatic drive_cells(input int rows);
    a = W'({$urandom, $urandom});
    b = (rows > 1) ? W'({$urandom, $urandom}) : '0;
    c = (rows > 2) ? W'({$urandom, $urandom}) : '0;
    nrows = 2'(rows);
    for (int i = 0; i < int'(W); i++) begin
      logic [1:0] n;
      n = 2'(a[i]) + 2'(b[i]) + 2'(c[i]);
      cnt0[i] = n[0];
      cnt1[i] = n[1];
    end
  endtask

  initial begin
    sense = 1'b0; en = '0; nrows = 2'd1; cnt0 = '0; cnt1 = '0; latch_rst = 1'b0;
    carry_ref = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(carry_q, '0, "latch after reset");

    for (int it = 0; it < 200; it++) begin
      int sel;
      sel = int'($urandom_range(0, 5));
      @(negedge clk);
      sense = 1'b1;
      latch_rst = 1'b0;
      unique case (sel)
        0: begin  // regular read of one cell
          en = sa_enables(SA_RW); drive_cells(1); #1;
          check(bl, a, "read");
        end
        1: begin  // XNOR2 of two cells
          en = sa_enables(SA_XNOR); drive_cells(2); #1;
          check(bl, ~(a ^ b), "xnor2");
        end
        2: begin  // carry: majority of three cells, into the latch
          en = sa_enables(SA_CARRY); drive_cells(3); #1;
          check(bl, (a & b) | (a & c) | (b & c), "carry");
          carry_ref = (a & b) | (a & c) | (b & c);
        end
        3: begin  // sum: XOR2 of two cells with the latched carry
          en = sa_enables(SA_SUM); drive_cells(2); #1;
          check(bl, a ^ b ^ carry_ref, "sum");
        end
        4: begin  // carry-mode enables without a sense: latch holds
          sense = 1'b0;
          en = sa_enables(SA_CARRY); drive_cells(3); #1;
        end
        default: begin  // latch reset
          sense = 1'b0;
          latch_rst = 1'b1;
          carry_ref = '0;
        end
      endcase
      @(negedge clk);
      sense = 1'b0;
      latch_rst = 1'b0;
      check(carry_q, carry_ref, "carry latch");
    end

    // amplifiers off: nothing driven
    @(negedge clk);
    en = '0; drive_cells(1); #1;
    check(bl, '0, "amplifiers off");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
