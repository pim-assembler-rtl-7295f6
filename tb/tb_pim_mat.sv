// tb_pim_mat: MAT of four sub-arrays. Each sub-array stores three k-mer
// rows (CGT, GTG, TGT as in the hash-table example, rotated per sub-array);
// the query GTG is written to every temp row with one broadcast write, and
// one broadcast compare per slot (RowClone to x1/x2, XNOR2) must raise the
// DPU flag exactly in the sub-arrays whose slot holds GTG. Rows are also
// read back through the global row buffer, and busy must cover every
// instruction, with sub_busy marking exactly the addressed sub-arrays.
module tb_pim_mat;
  import pim_pkg::*;

  localparam int unsigned NSUB = 4;
  localparam int unsigned NC   = COLS;

  logic            clk = 1'b0;
  logic            rst_n = 1'b0;
  logic            in_valid;
  logic            all;
  logic [1:0]      sub_sel;
  instr_t          instr;
  logic [NC-1:0]   wdata;
  logic            busy;
  logic [NSUB-1:0] sub_busy;
  logic            rvalid;
  logic [NC-1:0]   rdata;
  logic [NSUB-1:0] match, match_valid;

  int checks = 0;
  int failures = 0;

  pim_mat #(.NSUB(NSUB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [NC-1:0] last_row;
  logic          got_row;
  always @(posedge clk) if (rvalid) begin last_row <= rdata; got_row <= 1'b1; end

  task automatic issue(input bit a, input int s, input opcode_e op, input sa_mode_e f,
                       input int s1, input int s2, input int d, input logic [NC-1:0] wd);
    int n;
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL busy before issue"); end
    in_valid = 1'b1; all = a; sub_sel = 2'(s);
    instr = '0; instr.op = op; instr.func = f; instr.src1 = 10'(s1); instr.src2 = 10'(s2);
    instr.des = 10'(d); instr.size = 10'd1;
    wdata = wd;
    @(negedge clk);
    in_valid = 1'b0;
    if (op inside {OP_AAP1, OP_AAP2}) begin
      checks++;
      if (sub_busy != (a ? {NSUB{1'b1}} : NSUB'(1) << s)) begin
        failures++; $display("FAIL sub_busy %b after issue to %0d (all %0d)", sub_busy, s, a);
      end
    end
    n = 0;
    while (busy) begin n++; @(negedge clk); end
    checks++;
    if (op inside {OP_AAP1, OP_AAP2} && n != 3) begin
      failures++; $display("FAIL %s busy for %0d cycles", op.name(), n);
    end
  endtask

  function automatic logic [NC-1:0] kmer(string s);
    logic [NC-1:0] r;
    r = '0;
    for (int i = 0; i < s.len(); i++)
      r[2*i +: 2] = (s[i] == "A") ? 2'b00 : (s[i] == "T") ? 2'b01 : (s[i] == "C") ? 2'b10 : 2'b11;
    return r;
  endfunction

  string keys[3];
  localparam int X1 = COMP_BASE;

  initial begin
    in_valid = 1'b0; all = 1'b0; sub_sel = '0; instr = '0; wdata = '0; got_row = 1'b0;
    keys = '{"CGT", "GTG", "TGT"};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < int'(NSUB); s++)
      for (int j = 0; j < 3; j++)
        issue(1'b0, s, OP_WRITE, SA_RW, 0, 0, KMER_BASE + j, kmer(keys[(j + s) % 3]));
    issue(1'b1, 0, OP_WRITE, SA_RW, 0, 0, TEMP_BASE, kmer("GTG"));

    for (int j = 0; j < 3; j++) begin
      logic [NSUB-1:0] exp;
      logic [NSUB-1:0] seen;
      issue(1'b1, 0, OP_AAP1, SA_RW, KMER_BASE + j, 0, X1, '0);
      issue(1'b1, 0, OP_AAP1, SA_RW, TEMP_BASE, 0, X1 + 1, '0);
      fork
        issue(1'b1, 0, OP_AAP2, SA_XNOR, X1, X1 + 1, X1 + 2, '0);
        begin
          seen = '0;
          repeat (6) begin @(posedge clk); #1; seen |= match_valid; end
        end
      join
      for (int s = 0; s < int'(NSUB); s++) exp[s] = (keys[(j + s) % 3] == "GTG");
      checks += 2;
      if (seen !== '1) begin failures++; $display("FAIL match_valid seen %b", seen); end
      if (match !== exp) begin failures++; $display("FAIL slot %0d match %b expected %b", j, match, exp); end
    end

    // read back every stored k-mer through the row buffer
    for (int s = 0; s < int'(NSUB); s++)
      for (int j = 0; j < 3; j++) begin
        got_row = 1'b0;
        issue(1'b0, s, OP_READ, SA_RW, KMER_BASE + j, 0, 0, '0);
        repeat (3) @(posedge clk);
        checks += 2;
        if (!got_row) begin failures++; $display("FAIL no row returned"); end
        if (last_row !== kmer(keys[(j + s) % 3])) begin
          failures++; $display("FAIL sub %0d slot %0d read %h", s, j, last_row[7:0]);
        end
      end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
