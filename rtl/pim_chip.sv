// pim_chip: processing-in-DRAM genome assembly chip (top level).
//
// The chip is NBANK banks of 4 x 4 MATs of computational sub-arrays,
// 1024 x 256 each. A host issues the platform's AAP instructions (plus row
// write/read and carry-latch reset) through the chip I/O buffer; the chip
// controller decodes the bank address and the scope, which selects one
// sub-array, a MAT, a bank or the whole chip, so that one instruction can run
// in many sub-arrays at once. Results that the host needs come back as rows
// (rvalid/rdata) or as DPU match flags, one per sub-array.
//
// Handshake and timing: cmd_ready is high when the I/O buffer is empty and
// none of the sub-arrays that the presented command addresses (scope, bank,
// MAT, sub-array fields) is busy; it may therefore depend on those fields.
// A command is taken on a clock with cmd_valid and cmd_ready high, held in
// the I/O buffer for one cycle and then issued. Commands to different
// sub-arrays overlap: one can be accepted every second clock while earlier
// ones still run elsewhere, which is how two or four replicated sub-arrays
// work on a function side by side. Reads that overlap return in the order
// they were accepted, at least two clocks apart. A row read returns on rdata four cycles after its sub-array's PRE
// cycle (controller, MAT buffer, bank buffer, I/O buffer). The flag of
// sub-array s of MAT m of bank b is match[(b*NMAT + m)*NSUB + s]; it is
// updated one cycle after each XNOR2 sense, marked by match_valid.
// The number of banks follows the eight-bank platform used for the
// throughput comparison; sub-arrays per MAT (8) are this design's choice.
module pim_chip
  import pim_pkg::*;
#(
  parameter int unsigned NBANK = 8,
  parameter int unsigned NMAT  = 16,
  parameter int unsigned NSUB  = 8,
  parameter int unsigned NROWS = ROWS,
  parameter int unsigned NCOLS = COLS,
  parameter int unsigned BAW   = (NBANK > 1) ? $clog2(NBANK) : 1,
  parameter int unsigned MAW   = (NMAT > 1) ? $clog2(NMAT) : 1,
  parameter int unsigned SAW   = (NSUB > 1) ? $clog2(NSUB) : 1,
  parameter int unsigned NFLAG = NBANK * NMAT * NSUB
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cmd_valid,
  output logic               cmd_ready,
  input  scope_e             cmd_scope,
  input  logic [BAW-1:0]     cmd_bank,
  input  logic [MAW-1:0]     cmd_mat,
  input  logic [SAW-1:0]     cmd_sub,
  input  instr_t             cmd_instr,
  input  logic [NCOLS-1:0]   cmd_wdata,
  output logic               rvalid,
  output logic [NCOLS-1:0]   rdata,
  output logic [NFLAG-1:0]   match,
  output logic [NFLAG-1:0]   match_valid
);

  // ------------------------------------------------------- I/O buffer
  logic             buf_valid;
  scope_e           buf_scope;
  logic [BAW-1:0]   buf_bank;
  logic [MAW-1:0]   buf_mat;
  logic [SAW-1:0]   buf_sub;
  instr_t           buf_instr;
  logic [NCOLS-1:0] buf_wdata;

  logic [NFLAG-1:0]            sub_busy;
  logic [NFLAG-1:0]            cmd_tgt;
  logic [NBANK-1:0]            bank_en;
  logic [NBANK-1:0]            bank_rvalid;
  logic [NBANK-1:0][NCOLS-1:0] bank_rdata;

  // sub-arrays the presented command would reach
  always_comb begin
    for (int b = 0; b < int'(NBANK); b++)
      for (int m = 0; m < int'(NMAT); m++)
        for (int s = 0; s < int'(NSUB); s++)
          cmd_tgt[(b*int'(NMAT) + m)*int'(NSUB) + s] =
            (cmd_scope == SC_CHIP) ||
            ((int'(cmd_bank) == b) &&
             ((cmd_scope == SC_BANK) ||
              ((int'(cmd_mat) == m) && ((cmd_scope == SC_MAT) || (int'(cmd_sub) == s)))));
  end

  assign cmd_ready = !buf_valid && !(|(cmd_tgt & sub_busy));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_valid <= 1'b0;
      buf_scope <= SC_SUB;
      buf_bank  <= '0;
      buf_mat   <= '0;
      buf_sub   <= '0;
      buf_instr <= '0;
      buf_wdata <= '0;
    end else begin
      if (cmd_valid && cmd_ready) begin
        buf_valid <= 1'b1;
        buf_scope <= cmd_scope;
        buf_bank  <= cmd_bank;
        buf_mat   <= cmd_mat;
        buf_sub   <= cmd_sub;
        buf_instr <= cmd_instr;
        buf_wdata <= cmd_wdata;
      end else begin
        buf_valid <= 1'b0;
      end
    end
  end

  // ------------------------------------------------- chip controller
  always_comb begin
    bank_en = '0;
    if (buf_valid) begin
      if (buf_scope == SC_CHIP) bank_en = '1;
      else if (int'(buf_bank) < int'(NBANK)) bank_en[buf_bank] = 1'b1;
    end
  end

  for (genvar b = 0; b < int'(NBANK); b++) begin : g_bank
    pim_bank #(.NMAT(NMAT), .NSUB(NSUB), .NROWS(NROWS), .NCOLS(NCOLS),
               .MAW(MAW), .SAW(SAW)) u_bank (
      .clk         (clk),
      .rst_n       (rst_n),
      .in_valid    (bank_en[b]),
      .scope       (buf_scope),
      .mat_sel     (buf_mat),
      .sub_sel     (buf_sub),
      .instr       (buf_instr),
      .wdata       (buf_wdata),
      .busy        (),
      .sub_busy    (sub_busy[b*NMAT*NSUB +: NMAT*NSUB]),
      .rvalid      (bank_rvalid[b]),
      .rdata       (bank_rdata[b]),
      .match       (match[b*NMAT*NSUB +: NMAT*NSUB]),
      .match_valid (match_valid[b*NMAT*NSUB +: NMAT*NSUB])
    );
  end

  grb #(.N(NBANK), .NCOLS(NCOLS)) u_io (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (bank_rvalid),
    .in_row    (bank_rdata),
    .out_valid (rvalid),
    .out_row   (rdata)
  );

endmodule
