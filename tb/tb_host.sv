// tb_host: host-side driver and checker for the processing-in-DRAM chip.
//
// Plays the processor that issues AAP instructions and runs two assembly
// kernels on the chip, checking every result against values computed here
// in plain software:
//   1. k-mer counting (hash-table build) for the read CGTGCGTGCTT with k = 5
//      in one sub-array: each k-mer is written to the temp row, compared
//      with every stored k-mer by RowClone + two-row XNOR2, the DPU flag
//      decides between "increment the frequency" and "insert the k-mer",
//      and the 32-bit frequencies, stored bit-serially down the 32 value
//      rows (one column per stored k-mer), are incremented with in-memory
//      bit-serial addition (sum and carry activations).
//   2. vertex degree of a 6-vertex graph (adjacency rows) in every
//      sub-array of one MAT at once: three rows at a time are reduced by
//      in-memory full addition to carry/sum rows, then the two 2-bit words
//      are added bit-serially; sub-array 0 holds the example graph whose
//      column sums are 4 3 3 2 3 1.
//   3. with KSWEEP set, k-mer counting as in 1 for k = 16, 22, 26 and 32 on
//      random reads made of a random sequence repeated once, so some k-mers
//      occur twice and others once.
//   4. parallelism degree 2: the same compare runs in two sub-arrays of one
//      MAT, the second receiving each instruction while the first is still
//      busy; checks that the chip accepts it two clocks after the first.
// It counts how often each mechanism occurred (XNOR2 match and mismatch,
// RowClone, triple-row carry, sum, latch reset, broadcast, host write/read,
// command stall, overlapped sub-arrays) and fails any that never occurred.
// It checks the command latency: an AAP of size s is accepted and the chip is ready again after
// 3*s + 2 clocks. Ends with the TB_RESULT line and $finish; has its own
// watchdog.
module tb_host
  import pim_pkg::*;
#(
  parameter int unsigned NBANK = 8,
  parameter int unsigned NMAT  = 16,
  parameter int unsigned NSUB  = 8,
  parameter int unsigned NCOLS = COLS,
  parameter int unsigned BAW   = (NBANK > 1) ? $clog2(NBANK) : 1,
  parameter int unsigned MAW   = (NMAT > 1) ? $clog2(NMAT) : 1,
  parameter int unsigned SAW   = (NSUB > 1) ? $clog2(NSUB) : 1,
  parameter int unsigned NFLAG = NBANK * NMAT * NSUB,
  parameter int unsigned WATCHDOG_CYCLES = 400000,
  parameter bit          KSWEEP = 1'b0
) (
  input  logic               clk,
  output logic               rst_n,
  output logic               cmd_valid,
  input  logic               cmd_ready,
  output scope_e             cmd_scope,
  output logic [BAW-1:0]     cmd_bank,
  output logic [MAW-1:0]     cmd_mat,
  output logic [SAW-1:0]     cmd_sub,
  output instr_t             cmd_instr,
  output logic [NCOLS-1:0]   cmd_wdata,
  input  logic               rvalid,
  input  logic [NCOLS-1:0]   rdata,
  input  logic [NFLAG-1:0]   match,
  input  logic [NFLAG-1:0]   match_valid
);

  int checks = 0;
  int failures = 0;

  // mechanism counters
  int n_match = 0, n_mismatch = 0, n_clone = 0, n_carry = 0, n_sum = 0;
  int n_lrst = 0, n_bcast = 0, n_write = 0, n_read = 0, n_stall = 0;

  // row map used by the kernels (data rows of a sub-array)
  localparam int TEMP_Q   = TEMP_BASE;       // query k-mer
  localparam int TEMP_INC = TEMP_BASE + 1;   // one-hot increment vector
  localparam int ZERO_ROW = TEMP_BASE + 2;   // all-zero row
  localparam int X1 = COMP_BASE, X2 = COMP_BASE + 1, X3 = COMP_BASE + 2;
  localparam int X4 = COMP_BASE + 3, X5 = COMP_BASE + 4;
  localparam int FREQ_BITS = VALUE_ROWS;     // 32
  localparam int ADJ_BASE  = KMER_BASE + 100;
  localparam int RESV_BASE = KMER_BASE + 200;
  localparam int PD_A      = KMER_BASE + 300;
  localparam int PD_Q      = KMER_BASE + 301;

  // clock count and the clock on which the last command was accepted
  int cyc = 0, last_accept = 0, n_overlap = 0, n_ksweep = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (WATCHDOG_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // ---------------------------------------------------------------- issue
  task automatic send(input scope_e sc, input int b, input int m, input int s,
                      input instr_t ins, input logic [NCOLS-1:0] wd, input bit wait_done = 1'b1);
    int lat;
    int n;
    @(negedge clk);
    cmd_valid = 1'b1;
    cmd_scope = sc;
    cmd_bank  = BAW'(b);
    cmd_mat   = MAW'(m);
    cmd_sub   = SAW'(s);
    cmd_instr = ins;
    cmd_wdata = wd;
    // ready depends on the addressed sub-arrays, so it is sampled with the
    // command presented
    #1;
    while (!cmd_ready) begin
      n_stall++;
      @(negedge clk);
    end
    @(negedge clk);
    cmd_valid = 1'b0;
    last_accept = cyc;
    if (sc != SC_SUB) n_bcast++;
    unique case (ins.op)
      OP_AAP1:  n_clone++;
      OP_AAP2:  if (ins.func == SA_XNOR) ; else n_sum++;
      OP_AAP3:  n_carry++;
      OP_LRST:  n_lrst++;
      OP_WRITE: n_write++;
      OP_READ:  n_read++;
      default: ;
    endcase
    // wait for completion and measure the latency of AAP instructions;
    // posted commands return at once and the next one stalls instead
    if (!wait_done) return;
    lat = 1;
    while (!cmd_ready) begin
      lat++;
      @(negedge clk);
    end
    if (ins.op inside {OP_AAP1, OP_AAP2, OP_AAP3}) begin
      n = (ins.size == 0) ? 1 : int'(ins.size);
      checks++;
      if (lat != 3 * n + 2) fail($sformatf("AAP latency %0d, expected %0d", lat, 3 * n + 2));
    end
  endtask

  function automatic instr_t mk(opcode_e op, sa_mode_e f, int s1, int s2, int s3, int d, int size);
    instr_t i;
    i.op = op; i.func = f;
    i.src1 = 10'(s1); i.src2 = 10'(s2); i.src3 = 10'(s3); i.des = 10'(d); i.size = 10'(size);
    return i;
  endfunction

  // per-kernel target
  scope_e tsc;
  int     tb_, tm_, ts_;

  task automatic aap1(input int src, input int des);
    send(tsc, tb_, tm_, ts_, mk(OP_AAP1, SA_RW, src, 0, 0, des, 1), '0);
  endtask
  task automatic aap2(input sa_mode_e f, input int s1, input int s2, input int des);
    send(tsc, tb_, tm_, ts_, mk(OP_AAP2, f, s1, s2, 0, des, 1), '0);
  endtask
  task automatic aap3(input int s1, input int s2, input int s3, input int des);
    send(tsc, tb_, tm_, ts_, mk(OP_AAP3, SA_CARRY, s1, s2, s3, des, 1), '0);
  endtask
  task automatic lrst();
    send(tsc, tb_, tm_, ts_, mk(OP_LRST, SA_RW, 0, 0, 0, 0, 1), '0);
  endtask

  task automatic write_row(input scope_e sc, input int b, input int m, input int s,
                           input int row, input logic [NCOLS-1:0] d, input bit wait_done = 1'b1);
    send(sc, b, m, s, mk(OP_WRITE, SA_RW, 0, 0, 0, row, 1), d, wait_done);
  endtask

  task automatic read_row(input int b, input int m, input int s, input int row,
                          output logic [NCOLS-1:0] d);
    int guard;
    fork
      begin
        guard = 0;
        do begin
          @(posedge clk);
          #1;
          guard++;
        end while (!rvalid && guard < 100);
        d = rdata;
        if (guard >= 100) fail("read timed out");
      end
      send(SC_SUB, b, m, s, mk(OP_READ, SA_RW, row, 0, 0, 0, 1), '0);
    join
  endtask

  // bit-serial in-memory addition D[0..m] = A[0..m-1] + B[0..m-1]
  // (D[m] is the carry out when with_cout is set).
  task automatic pim_add(input int a[], input int bb[], input int d[], input int m, input bit with_cout);
    lrst();
    aap1(ZERO_ROW, X3);
    for (int i = 0; i < m; i++) begin
      aap1(a[i], X1);
      aap1(bb[i], X2);
      aap2(SA_SUM, X1, X2, X4);     // sum with the carry latched so far
      aap1(a[i], X1);
      aap1(bb[i], X2);
      aap3(X1, X2, X3, X3);         // new carry into latch and x3
      aap1(X4, d[i]);
    end
    if (with_cout) aap1(X3, d[m]);
  endtask

  // full addition of three rows: s = r0 ^ r1 ^ r2, c = maj(r0, r1, r2)
  task automatic pim_fa3(input int r0, input int r1, input int r2, input int c, input int s);
    aap1(r2, X1);
    aap1(r2, X2);
    aap1(ZERO_ROW, X3);
    aap3(X1, X2, X3, X5);           // latch <- maj(r2, r2, 0) = r2
    aap1(r0, X1);
    aap1(r1, X2);
    aap2(SA_SUM, X1, X2, s);
    aap1(r0, X1);
    aap1(r1, X2);
    aap1(r2, X3);
    aap3(X1, X2, X3, c);
  endtask

  // ------------------------------------------------------- k-mer kernel
  function automatic logic [1:0] base_code(byte ch);
    unique case (ch)
      "A": return 2'b00;
      "T": return 2'b01;
      "C": return 2'b10;
      default: return 2'b11;   // G
    endcase
  endfunction

  function automatic logic [NCOLS-1:0] kmer_row(string s, int at, int k);
    logic [NCOLS-1:0] r;
    r = '0;
    for (int i = 0; i < k; i++) r[2*i +: 2] = base_code(s[at + i]);
    return r;
  endfunction

  task automatic kmer_kernel(input int b, input int m, input int s);
    kmer_count(b, m, s, "CGTGCGTGCTT", 5, 1'b1);
  endtask

  // Counting for the k-mer lengths used in genome assemblers (16, 22, 26,
  // 32): each read is a random sequence of k + 2 bases followed by itself,
  // so the k-mers inside each copy occur twice and those spanning the join
  // once.
  task automatic kmer_sweep(input int b, input int m, input int s);
    int    ks[4];
    string half;
    ks = '{16, 22, 26, 32};
    foreach (ks[i]) begin
      half = "";
      for (int j = 0; j < ks[i] + 2; j++) begin
        case ($urandom % 4)
          0: half = {half, "A"};
          1: half = {half, "T"};
          2: half = {half, "C"};
          default: half = {half, "G"};
        endcase
      end
      kmer_count(b, m, s, {half, half}, ks[i], 1'b0);
      n_ksweep++;
    end
  endtask

  task automatic kmer_count(input int b, input int m, input int s, input string read_s,
                            input int k, input bit verbose);
    int    nslots;
    string keys[$];
    int    freq[$];
    string sw_keys[$];
    int    sw_freq[$];
    int    idx;
    int    incr[], zero[], dst[];
    logic [NCOLS-1:0] r;
    int               nfail;
    nfail = failures;
    tsc = SC_SUB; tb_ = b; tm_ = m; ts_ = s;
    idx = (b * int'(NMAT) + m) * int'(NSUB) + s;

    // software reference
    for (int i = 0; i + k <= read_s.len(); i++) begin
      string km;
      int f;
      km = read_s.substr(i, i + k - 1);
      f = -1;
      foreach (sw_keys[j]) if (sw_keys[j] == km) f = j;
      if (f < 0) begin sw_keys.push_back(km); sw_freq.push_back(1); end
      else sw_freq[f]++;
    end

    // clear the value region of this sub-array
    for (int v = 0; v < FREQ_BITS; v++) write_row(SC_SUB, b, m, s, VALUE_BASE + v, '0);

    incr = new[FREQ_BITS];
    zero = new[FREQ_BITS];
    dst  = new[FREQ_BITS];
    for (int v = 0; v < FREQ_BITS; v++) begin
      incr[v] = (v == 0) ? TEMP_INC : ZERO_ROW;
      dst[v]  = VALUE_BASE + v;
    end

    nslots = 0;
    for (int i = 0; i + k <= read_s.len(); i++) begin
      int hit;
      hit = -1;
      write_row(SC_SUB, b, m, s, TEMP_Q, kmer_row(read_s, i, k));
      for (int j = 0; j < nslots; j++) begin
        logic fl;
        aap1(KMER_BASE + j, X1);
        aap1(TEMP_Q, X2);
        aap2(SA_XNOR, X1, X2, X3);
        fl = match[idx];
        if (fl) begin
          n_match++;
          if (hit < 0) hit = j;
        end else begin
          n_mismatch++;
        end
      end
      if (hit < 0) begin           // MEM_insert(k_mer, 1)
        aap1(TEMP_Q, KMER_BASE + nslots);
        hit = nslots;
        nslots++;
      end
      // frequency[hit] += 1 by in-memory addition of a one-hot row
      r = '0;
      r[hit] = 1'b1;
      write_row(SC_SUB, b, m, s, TEMP_INC, r);
      pim_add(dst, incr, dst, FREQ_BITS, 1'b0);
    end

    // read back the hash table
    checks++;
    if (nslots != sw_keys.size()) fail($sformatf("%0d distinct k-mers, expected %0d", nslots, sw_keys.size()));
    for (int j = 0; j < nslots && j < sw_keys.size(); j++) begin
      read_row(b, m, s, KMER_BASE + j, r);
      checks++;
      if (r !== kmer_row(sw_keys[j], 0, k)) fail($sformatf("k-mer slot %0d: %h expected %h", j, r[15:0], kmer_row(sw_keys[j], 0, k)));
    end
    freq = {};
    for (int j = 0; j < nslots; j++) freq.push_back(0);
    for (int v = 0; v < FREQ_BITS; v++) begin
      read_row(b, m, s, VALUE_BASE + v, r);
      for (int j = 0; j < nslots; j++) if (r[j]) freq[j] += (1 << v);
      for (int j = nslots; j < int'(NCOLS); j++) begin
        checks++;
        if (r[j]) fail($sformatf("unused frequency column %0d bit %0d set", j, v));
      end
    end
    for (int j = 0; j < nslots && j < sw_keys.size(); j++) begin
      checks++;
      if (freq[j] != sw_freq[j]) fail($sformatf("frequency of %s is %0d, expected %0d", sw_keys[j], freq[j], sw_freq[j]));
      else if (verbose) $display("k-mer %s frequency %0d", sw_keys[j], freq[j]);
    end
    if (!verbose)
      $display("k = %0d: read of %0d bases, %0d k-mers, %0d distinct, %s", k, read_s.len(),
               read_s.len() - k + 1, nslots, (failures == nfail) ? "counts match" : "ERRORS");
  endtask

  // ------------------------------------------------------ degree kernel
  task automatic degree_kernel(input int b, input int m);
    logic [5:0][NCOLS-1:0] adj [NSUB];
    logic [NCOLS-1:0]      r;
    int                    a2[], b2[], d3[];
    int                    deg;
    int                    got;
    logic [2:0][NCOLS-1:0] res;
    // example graph (rows = sources, columns = destinations), then random ones
    for (int s = 0; s < int'(NSUB); s++) begin
      for (int i = 0; i < 6; i++) adj[s][i] = '0;
      if (s == 0) begin
        adj[s][0][5:0] = 6'b011110;
        adj[s][1][5:0] = 6'b110001;
        adj[s][2][5:0] = 6'b011001;
        adj[s][3][5:0] = 6'b000101;
        adj[s][4][5:0] = 6'b000111;
        adj[s][5][5:0] = 6'b000010;
      end else begin
        for (int i = 0; i < 6; i++)
          for (int w = 0; w < int'(NCOLS) / 32; w++) adj[s][i][w*32 +: 32] = $urandom;
      end
      for (int i = 0; i < 6; i++) write_row(SC_SUB, b, m, s, ADJ_BASE + i, adj[s][i], 1'b0);
    end

    // all sub-arrays of the MAT compute at once
    tsc = SC_MAT; tb_ = b; tm_ = m; ts_ = 0;
    pim_fa3(ADJ_BASE + 0, ADJ_BASE + 1, ADJ_BASE + 2, RESV_BASE + 1, RESV_BASE + 0);
    pim_fa3(ADJ_BASE + 3, ADJ_BASE + 4, ADJ_BASE + 5, RESV_BASE + 3, RESV_BASE + 2);
    a2 = '{RESV_BASE + 0, RESV_BASE + 1};
    b2 = '{RESV_BASE + 2, RESV_BASE + 3};
    d3 = '{RESV_BASE + 4, RESV_BASE + 5, RESV_BASE + 6};
    pim_add(a2, b2, d3, 2, 1'b1);

    for (int s = 0; s < int'(NSUB); s++) begin
      for (int i = 0; i < 3; i++) begin
        read_row(b, m, s, RESV_BASE + 4 + i, r);
        res[i] = r;
      end
      for (int c = 0; c < int'(NCOLS); c++) begin
        deg = 0;
        for (int i = 0; i < 6; i++) deg += int'(adj[s][i][c]);
        got = int'({res[2][c], res[1][c], res[0][c]});
        checks++;
        if (got != deg) fail($sformatf("sub %0d column %0d degree %0d, expected %0d", s, c, got, deg));
      end
      if (s == 0) begin
        int expv[6];
        expv = '{4, 3, 3, 2, 3, 1};
        for (int c = 0; c < 6; c++) begin
          got = int'({res[2][c], res[1][c], res[0][c]});
          checks++;
          if (got != expv[c]) fail($sformatf("example vertex %0d degree %0d", c, got));
        end
        $display("example graph degrees: %0d %0d %0d %0d %0d %0d",
                 int'({res[2][0], res[1][0], res[0][0]}), int'({res[2][1], res[1][1], res[0][1]}),
                 int'({res[2][2], res[1][2], res[0][2]}), int'({res[2][3], res[1][3], res[0][3]}),
                 int'({res[2][4], res[1][4], res[0][4]}), int'({res[2][5], res[1][5], res[0][5]}));
      end
    end
  endtask

  // Parallelism degree 2: two replicated sub-arrays of one MAT compare rows
  // side by side. Each instruction goes to sub-array 0 without waiting and
  // then to sub-array 1, which the chip must accept two clocks later while
  // sub-array 0 is still busy. The XNOR2 rows and the DPU flags of both are
  // checked; the query equals the stored row in every other case.
  task automatic pd2_kernel(input int b, input int m);
    logic [NCOLS-1:0] a [2];
    logic [NCOLS-1:0] q [2];
    logic [NCOLS-1:0] r;
    instr_t           ops [3];
    int               t0;
    int               f;
    ops[0] = mk(OP_AAP1, SA_RW, PD_A, 0, 0, X1, 1);
    ops[1] = mk(OP_AAP1, SA_RW, PD_Q, 0, 0, X2, 1);
    ops[2] = mk(OP_AAP2, SA_XNOR, X1, X2, 0, X3, 1);
    for (int trial = 0; trial < 4; trial++) begin
      for (int s = 0; s < 2; s++) begin
        for (int w = 0; w < int'(NCOLS) / 32; w++) a[s][w*32 +: 32] = $urandom;
        q[s] = a[s];
        if ((trial + s) % 2 == 1) q[s][$urandom % NCOLS] ^= 1'b1;
        write_row(SC_SUB, b, m, s, PD_A, a[s]);
        write_row(SC_SUB, b, m, s, PD_Q, q[s]);
      end
      for (int k = 0; k < 3; k++) begin
        send(SC_SUB, b, m, 0, ops[k], '0, 1'b0);
        t0 = last_accept;
        send(SC_SUB, b, m, 1, ops[k], '0);
        checks++;
        if (last_accept - t0 != 2)
          fail($sformatf("second sub-array accepted %0d clocks after the first", last_accept - t0));
        else n_overlap++;
      end
      for (int s = 0; s < 2; s++) begin
        f = (b * int'(NMAT) + m) * int'(NSUB) + s;
        checks++;
        if (match[f] != (a[s] == q[s])) fail($sformatf("P_d=2 sub %0d flag %0b", s, match[f]));
        read_row(b, m, s, X3, r);
        checks++;
        if (r != ~(a[s] ^ q[s])) fail($sformatf("P_d=2 sub %0d XNOR2 row wrong", s));
      end
    end
  endtask

  // count DPU strobes seen on the flag bus
  int n_flag_strobes = 0;
  always @(posedge clk) if (rst_n && |match_valid) n_flag_strobes++;

  task automatic need(input int n, input string what);
    checks++;
    if (n == 0) fail($sformatf("mechanism never exercised: %s", what));
    else $display("%-28s %0d", what, n);
  endtask

  initial begin
    rst_n = 1'b0;
    cmd_valid = 1'b0; cmd_scope = SC_SUB; cmd_bank = '0; cmd_mat = '0; cmd_sub = '0;
    cmd_instr = '0; cmd_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // the all-zero row, written once into every sub-array of the chip
    write_row(SC_CHIP, 0, 0, 0, ZERO_ROW, '0);

    kmer_kernel(int'(NBANK) - 1, int'(NMAT) - 1, int'(NSUB) - 1);
    degree_kernel(0, 0);
    pd2_kernel(0, 0);
    if (KSWEEP) begin
      kmer_sweep(0, int'(NMAT) - 1, int'(NSUB) - 1);
      checks++;
      if (n_ksweep != 4) fail("k-mer length sweep incomplete");
    end

    need(n_match, "XNOR2 match");
    need(n_mismatch, "XNOR2 mismatch");
    need(n_flag_strobes, "DPU flag strobes");
    need(n_clone, "RowClone (AAP type 1)");
    need(n_sum, "two-row sum (AAP type 2)");
    need(n_carry, "triple-row carry (AAP type 3)");
    need(n_lrst, "carry latch reset");
    need(n_bcast, "broadcast instructions");
    need(n_write, "host row writes");
    need(n_read, "host row reads");
    need(n_stall, "command stalls on busy");
    need(n_overlap, "overlapped sub-arrays (P_d=2)");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
