// tb_pim_ctrl: checks the command sequences of the sub-array controller.
//
// For random instructions of every type the testbench builds the expected
// list of (command, raised rows, SA enable set), one entry per clock, and
// compares it with what the controller issues. It also checks the cycle
// count (3 commands per row of an AAP, done one clock after the last PRE),
// ready/busy behaviour and that a read returns the bit-line value.
module tb_pim_ctrl;
  import pim_pkg::*;

  localparam int unsigned NC = 32;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          in_valid;
  instr_t        instr;
  logic [NC-1:0] in_wdata;
  logic          ready, done, rvalid;
  logic [NC-1:0] rdata;
  sub_cmd_e      cmd;
  act_t          act;
  sa_en_t        sa_en;
  logic [NC-1:0] wdata;
  logic [NC-1:0] bl_q;

  int checks = 0;
  int failures = 0;

  pim_ctrl #(.NCOLS(NC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct packed {
    sub_cmd_e c;
    act_t     a;
    sa_en_t   e;
  } step_t;

  step_t exp_q[$];

  function automatic step_t mk(sub_cmd_e c, int n, int r0, int r1, int r2, sa_mode_e m);
    step_t s;
    s.c = c;
    s.a = '0;
    if (c == CMD_ACT) begin
      s.a.nrows = 2'(n);
      s.a.addr[0] = 10'(r0);
      if (n > 1) s.a.addr[1] = 10'(r1);
      if (n > 2) s.a.addr[2] = 10'(r2);
    end
    s.e = sa_enables(m);
    return s;
  endfunction

  task automatic run(input instr_t ins, input logic [NC-1:0] wd);
    int n;
    int cycles;
    exp_q.delete();
    n = (ins.size == 0) ? 1 : int'(ins.size);
    unique case (ins.op)
      OP_AAP1, OP_AAP2, OP_AAP3: begin
        for (int i = 0; i < n; i++) begin
          if (ins.op == OP_AAP1) exp_q.push_back(mk(CMD_ACT, 1, int'(ins.src1) + i, 0, 0, SA_RW));
          if (ins.op == OP_AAP2) exp_q.push_back(mk(CMD_ACT, 2, int'(ins.src1) + i, int'(ins.src2) + i, 0, ins.func));
          if (ins.op == OP_AAP3) exp_q.push_back(mk(CMD_ACT, 3, int'(ins.src1) + i, int'(ins.src2) + i, int'(ins.src3) + i, SA_CARRY));
          exp_q.push_back(mk(CMD_ACT, 1, int'(ins.des) + i, 0, 0, SA_RW));
          exp_q.push_back(mk(CMD_PRE, 0, 0, 0, 0, SA_RW));
        end
      end
      OP_WRITE: begin
        exp_q.push_back(mk(CMD_ACT, 1, int'(ins.des), 0, 0, SA_RW));
        exp_q.push_back(mk(CMD_WR, 0, 0, 0, 0, SA_RW));
        exp_q.push_back(mk(CMD_PRE, 0, 0, 0, 0, SA_RW));
      end
      OP_READ: begin
        exp_q.push_back(mk(CMD_ACT, 1, int'(ins.src1), 0, 0, SA_RW));
        exp_q.push_back(mk(CMD_PRE, 0, 0, 0, 0, SA_RW));
      end
      default: exp_q.push_back(mk(CMD_LRST, 0, 0, 0, 0, SA_RW));
    endcase

    @(negedge clk);
    checks++;
    if (!ready) begin failures++; $display("FAIL not ready before instruction"); end
    in_valid = 1'b1; instr = ins; in_wdata = wd;
    @(negedge clk);
    in_valid = 1'b0; instr = '0;
    cycles = 0;
    while (!done && cycles < 5000) begin
      step_t got;
      got.c = cmd; got.a = act; got.e = sa_en;
      if (cmd == CMD_WR) begin
        checks++;
        if (wdata !== wd) begin failures++; $display("FAIL write data"); end
      end
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL extra command %s", cmd.name());
      end else begin
        step_t e;
        e = exp_q.pop_front();
        if (got !== e) begin
          failures++;
          $display("FAIL op %s step %0d: got %s/%0d/%h/%b exp %s/%0d/%h/%b", ins.op.name(), cycles,
                   got.c.name(), got.a.nrows, got.a.addr, got.e, e.c.name(), e.a.nrows, e.a.addr, e.e);
        end
      end
      checks++;
      if (ready) begin failures++; $display("FAIL ready while busy"); end
      cycles++;
      @(negedge clk);
    end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d commands missing", exp_q.size()); end
    checks++;
    if ((ins.op inside {OP_AAP1, OP_AAP2, OP_AAP3} && cycles != 3 * n) ||
        (ins.op == OP_WRITE && cycles != 3) || (ins.op == OP_READ && cycles != 2) ||
        (ins.op == OP_LRST && cycles != 1)) begin
      failures++;
      $display("FAIL %s took %0d cycles", ins.op.name(), cycles);
    end
    if (ins.op == OP_READ) begin
      checks++;
      if (!(rvalid && rdata === bl_q)) begin failures++; $display("FAIL read data"); end
    end
  endtask

  initial begin
    in_valid = 1'b0; instr = '0; in_wdata = '0; bl_q = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 150; it++) begin
      instr_t ins;
      int k;
      ins = '0;
      k = int'($urandom_range(0, 5));
      unique case (k)
        0: ins.op = OP_AAP1;
        1: ins.op = OP_AAP2;
        2: ins.op = OP_AAP3;
        3: ins.op = OP_WRITE;
        4: ins.op = OP_READ;
        default: ins.op = OP_LRST;
      endcase
      ins.func = ($urandom_range(0, 1) == 0) ? SA_XNOR : SA_SUM;
      ins.src1 = 10'($urandom_range(0, 900));
      ins.src2 = 10'($urandom_range(0, 900));
      ins.src3 = 10'($urandom_range(0, 900));
      ins.des  = 10'($urandom_range(0, 900));
      ins.size = 10'($urandom_range(0, 6));
      bl_q = NC'($urandom);
      run(ins, NC'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
