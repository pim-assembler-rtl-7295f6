// tb_compute_subarray: drives the full-size sub-array (1016 data rows, 8
// computation rows, 256 bit-lines) with raw ACTIVATE / WRITE / PRECHARGE
// commands and checks, against values computed in the testbench:
//   - host write and read-back of data and computation rows,
//   - RowClone copy (ACT src, ACT des, PRE) between data rows,
//   - two-row activation in XNOR2 mode: bit-line result, DPU strobe, the
//     result restored into both source rows and copied to a destination,
//   - triple-row activation in carry mode (majority) followed by a sum-mode
//     activation that uses the latched carry, and latch reset.
module tb_compute_subarray;
  import pim_pkg::*;

  localparam int unsigned NC = COLS;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  sub_cmd_e      cmd;
  act_t          act;
  sa_en_t        sa_en;
  logic [NC-1:0] wdata;
  logic [NC-1:0] bl_q;
  logic          open_q;
  logic          sensed_q;
  sa_en_t        sensed_en_q;

  int checks = 0;
  int failures = 0;

  compute_subarray dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [NC-1:0] got, input logic [NC-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [NC-1:0] rnd_row();
    logic [NC-1:0] r;
    for (int i = 0; i < int'(NC) / 32; i++) r[i*32 +: 32] = $urandom;
    return r;
  endfunction

  task automatic issue(input sub_cmd_e c, input int n, input int r0, input int r1, input int r2,
                       input sa_mode_e m, input logic [NC-1:0] d);
    @(negedge clk);
    cmd = c;
    act.nrows = 2'(n);
    act.addr[0] = 10'(r0); act.addr[1] = 10'(r1); act.addr[2] = 10'(r2);
    sa_en = sa_enables(m);
    wdata = d;
    @(posedge clk);
    #1;
    cmd = CMD_NOP;
  endtask

  task automatic write_row(input int r, input logic [NC-1:0] d);
    issue(CMD_ACT, 1, r, 0, 0, SA_RW, '0);
    issue(CMD_WR,  1, 0, 0, 0, SA_RW, d);
    issue(CMD_PRE, 1, 0, 0, 0, SA_RW, '0);
  endtask

  task automatic read_row(input int r, output logic [NC-1:0] d);
    issue(CMD_ACT, 1, r, 0, 0, SA_RW, '0);
    d = bl_q;
    issue(CMD_PRE, 1, 0, 0, 0, SA_RW, '0);
  endtask

  localparam int X1 = COMP_BASE;

  logic [NC-1:0] a, b, c, d, e, got, carry, rc;
  int            rows[8];

  initial begin
    cmd = CMD_NOP; act = '0; sa_en = '0; wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // host write / read of data rows spread over the array
    rows = '{0, 3, 4, 500, 983, 984, 1015, 777};
    for (int i = 0; i < 8; i++) begin
      a = rnd_row();
      write_row(rows[i], a);
      read_row(rows[i], got);
      check(got, a, $sformatf("write/read row %0d", rows[i]));
    end

    // RowClone: ACT src, ACT des, PRE
    a = rnd_row();
    rc = a;
    write_row(10, a);
    write_row(20, rnd_row());
    issue(CMD_ACT, 1, 10, 0, 0, SA_RW, '0);
    issue(CMD_ACT, 1, 20, 0, 0, SA_RW, '0);
    issue(CMD_PRE, 1, 0, 0, 0, SA_RW, '0);
    read_row(20, got);
    check(got, a, "RowClone destination");
    read_row(10, got);
    check(got, a, "RowClone source kept");

    // XNOR2 by two-row activation of x1, x2, result copied to row 30
    for (int t = 0; t < 4; t++) begin
      a = rnd_row();
      b = (t == 0) ? a : rnd_row();
      write_row(X1, a);
      write_row(X1 + 1, b);
      issue(CMD_ACT, 2, X1, X1 + 1, 0, SA_XNOR, '0);
      check(bl_q, ~(a ^ b), "XNOR2 on bit-lines");
      checks++;
      if (!(sensed_q && sensed_en_q == sa_enables(SA_XNOR))) begin
        failures++;
        $display("FAIL sense strobe missing after XNOR2");
      end
      issue(CMD_ACT, 1, 30, 0, 0, SA_RW, '0);
      checks++;
      if (sensed_q) begin
        failures++;
        $display("FAIL second ACTIVATE re-sensed");
      end
      issue(CMD_PRE, 1, 0, 0, 0, SA_RW, '0);
      read_row(30, got);
      check(got, ~(a ^ b), "XNOR2 copied to destination");
      read_row(X1, got);
      check(got, ~(a ^ b), "XNOR2 restored into source x1");
    end

    // carry by triple-row activation, then sum with the latched carry
    a = rnd_row(); b = rnd_row(); c = rnd_row();
    write_row(X1, a); write_row(X1 + 1, b); write_row(X1 + 2, c);
    issue(CMD_ACT, 3, X1, X1 + 1, X1 + 2, SA_CARRY, '0);
    carry = (a & b) | (a & c) | (b & c);
    check(bl_q, carry, "TRA majority");
    issue(CMD_PRE, 1, 0, 0, 0, SA_RW, '0);
    read_row(X1 + 2, got);
    check(got, carry, "TRA result restored into x3");
    d = rnd_row(); e = rnd_row();
    write_row(X1 + 3, d); write_row(X1 + 4, e);
    issue(CMD_ACT, 2, X1 + 3, X1 + 4, 0, SA_SUM, '0);
    check(bl_q, d ^ e ^ carry, "sum with latched carry");
    issue(CMD_PRE, 1, 0, 0, 0, SA_RW, '0);

    // latch reset: the sum becomes the plain XOR
    issue(CMD_LRST, 1, 0, 0, 0, SA_RW, '0);
    write_row(X1 + 3, d); write_row(X1 + 4, e);
    issue(CMD_ACT, 2, X1 + 3, X1 + 4, 0, SA_SUM, '0);
    check(bl_q, d ^ e, "sum after latch reset");
    issue(CMD_PRE, 1, 0, 0, 0, SA_RW, '0);

    // earlier data row untouched by the computation
    read_row(10, got);
    check(got, rc, "data row 10 untouched by the computations");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
