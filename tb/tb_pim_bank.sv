// tb_pim_bank: bank of four MATs of two sub-arrays. Checks the bank
// controller's routing of each scope: a write addressed to one sub-array,
// to every sub-array of one MAT and to every sub-array of the bank must land
// exactly where the scope says, which is verified by reading every
// sub-array back. Also checks the read latency (the row is valid at the bank
// output in the fifth clock after the read is accepted: ACT, PRE, controller
// register, MAT buffer, bank buffer)
// and that busy rises after every accepted instruction, with sub_busy set
// for exactly the sub-arrays the scope addresses.
module tb_pim_bank;
  import pim_pkg::*;

  localparam int unsigned NMAT = 4;
  localparam int unsigned NSUB = 2;
  localparam int unsigned NC   = COLS;

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic                 in_valid;
  scope_e               scope;
  logic [1:0]           mat_sel;
  logic [0:0]           sub_sel;
  instr_t               instr;
  logic [NC-1:0]        wdata;
  logic                 busy;
  logic [NMAT*NSUB-1:0] sub_busy;
  logic                 rvalid;
  logic [NC-1:0]        rdata;
  logic [NMAT*NSUB-1:0] match, match_valid;

  int checks = 0;
  int failures = 0;

  pim_bank #(.NMAT(NMAT), .NSUB(NSUB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NMAT*NSUB-1:0] tgt_mask(input scope_e sc, input int m, input int s);
    logic [NMAT*NSUB-1:0] r;
    r = '0;
    for (int i = 0; i < int'(NMAT); i++)
      for (int j = 0; j < int'(NSUB); j++)
        r[i*NSUB + j] = (sc inside {SC_BANK, SC_CHIP}) || (i == m && (sc == SC_MAT || j == s));
    return r;
  endfunction

  task automatic issue(input scope_e sc, input int m, input int s, input opcode_e op,
                       input int row, input logic [NC-1:0] wd);
    @(negedge clk);
    while (busy) @(negedge clk);
    in_valid = 1'b1; scope = sc; mat_sel = 2'(m); sub_sel = 1'(s);
    instr = '0; instr.op = op; instr.src1 = 10'(row); instr.des = 10'(row); instr.size = 10'd1;
    wdata = wd;
    @(negedge clk);
    in_valid = 1'b0;
    checks++;
    if (!busy) begin failures++; $display("FAIL busy low after issue"); end
    checks++;
    if (sub_busy != tgt_mask(sc, m, s)) begin
      failures++; $display("FAIL sub_busy %b after %s to MAT %0d sub %0d", sub_busy, sc.name(), m, s);
    end
  endtask

  task automatic read(input int m, input int s, input int row, output logic [NC-1:0] d);
    int lat;
    issue(SC_SUB, m, s, OP_READ, row, '0);
    lat = 1;
    while (!rvalid && lat < 50) begin @(negedge clk); lat++; end
    d = rdata;
    checks++;
    // ACT, PRE, then controller, MAT and bank registers
    if (lat != 5) begin failures++; $display("FAIL read latency %0d", lat); end
  endtask

  logic [NC-1:0] model [NMAT][NSUB];
  logic [NC-1:0] v, got;

  initial begin
    in_valid = 1'b0; scope = SC_SUB; mat_sel = '0; sub_sel = '0; instr = '0; wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 12; round++) begin
      scope_e sc;
      int m, s;
      sc = scope_e'($urandom_range(0, 3));
      m = int'($urandom_range(0, NMAT - 1));
      s = int'($urandom_range(0, NSUB - 1));
      for (int w = 0; w < int'(NC) / 32; w++) v[w*32 +: 32] = $urandom;
      if (round == 0) begin sc = SC_BANK; end
      if (round == 1) begin sc = SC_MAT; end
      if (round == 2) begin sc = SC_SUB; end
      issue(sc, m, s, OP_WRITE, 40, v);
      for (int mm = 0; mm < int'(NMAT); mm++)
        for (int ss = 0; ss < int'(NSUB); ss++)
          if (sc inside {SC_BANK, SC_CHIP} || (mm == m && (sc == SC_MAT || ss == s)))
            model[mm][ss] = v;
      for (int mm = 0; mm < int'(NMAT); mm++)
        for (int ss = 0; ss < int'(NSUB); ss++) begin
          read(mm, ss, 40, got);
          checks++;
          if (got !== model[mm][ss]) begin
            failures++;
            $display("FAIL round %0d scope %s: mat %0d sub %0d holds wrong row", round, sc.name(), mm, ss);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
