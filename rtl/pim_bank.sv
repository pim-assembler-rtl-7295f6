// pim_bank: a bank of NMAT MATs (4 x 4 by default).
//
// The bank controller decodes the MAT address of an instruction and,
// according to its scope, hands it to one sub-array of one MAT (SC_SUB), to
// every sub-array of one MAT (SC_MAT) or to every sub-array of every MAT
// (SC_BANK and SC_CHIP). Rows read by the host pass through the bank's
// global row buffer, one cycle after the MAT's buffer. busy is high while
// any controller of the bank works, and sub_busy has one bit per sub-array
// (same order as match); match/match_valid gather the DPU flags
// of all MATs, MAT-major (index = mat * NSUB + sub).
module pim_bank
  import pim_pkg::*;
#(
  parameter int unsigned NMAT  = 16,
  parameter int unsigned NSUB  = 8,
  parameter int unsigned NROWS = ROWS,
  parameter int unsigned NCOLS = COLS,
  parameter int unsigned MAW   = (NMAT > 1) ? $clog2(NMAT) : 1,
  parameter int unsigned SAW   = (NSUB > 1) ? $clog2(NSUB) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  scope_e                scope,
  input  logic [MAW-1:0]        mat_sel,
  input  logic [SAW-1:0]        sub_sel,
  input  instr_t                instr,
  input  logic [NCOLS-1:0]      wdata,
  output logic                  busy,
  output logic [NMAT*NSUB-1:0]  sub_busy,
  output logic                  rvalid,
  output logic [NCOLS-1:0]      rdata,
  output logic [NMAT*NSUB-1:0]  match,
  output logic [NMAT*NSUB-1:0]  match_valid
);

  logic [NMAT-1:0]             mat_en;
  logic [NMAT-1:0]             mat_busy;
  logic [NMAT-1:0]             mat_rvalid;
  logic [NMAT-1:0][NCOLS-1:0]  mat_rdata;
  logic                        sub_all;

  always_comb begin
    mat_en = '0;
    if (in_valid) begin
      if (scope inside {SC_BANK, SC_CHIP}) mat_en = '1;
      else if (int'(mat_sel) < int'(NMAT)) mat_en[mat_sel] = 1'b1;
    end
    sub_all = (scope != SC_SUB);
  end

  for (genvar m = 0; m < int'(NMAT); m++) begin : g_mat
    pim_mat #(.NSUB(NSUB), .NROWS(NROWS), .NCOLS(NCOLS), .SAW(SAW)) u_mat (
      .clk         (clk),
      .rst_n       (rst_n),
      .in_valid    (mat_en[m]),
      .all         (sub_all),
      .sub_sel     (sub_sel),
      .instr       (instr),
      .wdata       (wdata),
      .busy        (mat_busy[m]),
      .sub_busy    (sub_busy[m*NSUB +: NSUB]),
      .rvalid      (mat_rvalid[m]),
      .rdata       (mat_rdata[m]),
      .match       (match[m*NSUB +: NSUB]),
      .match_valid (match_valid[m*NSUB +: NSUB])
    );
  end

  assign busy = |mat_busy;

  grb #(.N(NMAT), .NCOLS(NCOLS)) u_grb (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (mat_rvalid),
    .in_row    (mat_rdata),
    .out_valid (rvalid),
    .out_row   (rdata)
  );

endmodule
