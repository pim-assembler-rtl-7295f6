// pim_mat: memory matrix (MAT) of computational sub-arrays.
//
// A MAT holds NSUB computational sub-arrays, each with its own controller.
// The global row decoder (grd) routes an instruction to one sub-array, or to
// all of them when all is high, so the same AAP instruction runs in several
// sub-arrays in parallel. Rows read by the host leave through the global row
// buffer (grb). The DPU ANDs the XNOR2 result of every sub-array into a
// per-sub-array match flag.
//
// Interface: an instruction is accepted in any cycle with in_valid high; the
// caller must only present one when the addressed controllers are idle:
// sub_busy[s] is high while controller s works, and busy is their OR. rvalid/rdata come out of the row buffer one cycle
// after the sub-array controller returns the row; match/match_valid come
// from the DPU. The number of sub-arrays per MAT is not fixed by the
// platform description; eight is this design's choice.
module pim_mat
  import pim_pkg::*;
#(
  parameter int unsigned NSUB  = 8,
  parameter int unsigned NROWS = ROWS,
  parameter int unsigned NCOLS = COLS,
  parameter int unsigned SAW   = (NSUB > 1) ? $clog2(NSUB) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             all,
  input  logic [SAW-1:0]   sub_sel,
  input  instr_t           instr,
  input  logic [NCOLS-1:0] wdata,
  output logic             busy,
  output logic [NSUB-1:0]  sub_busy,
  output logic             rvalid,
  output logic [NCOLS-1:0] rdata,
  output logic [NSUB-1:0]  match,
  output logic [NSUB-1:0]  match_valid
);

  logic [NSUB-1:0]             sub_en;
  logic [NSUB-1:0]             ctrl_ready;
  logic [NSUB-1:0]             ctrl_rvalid;
  logic [NSUB-1:0][NCOLS-1:0]  ctrl_rdata;
  logic [NSUB-1:0][NCOLS-1:0]  sub_bl;
  logic [NSUB-1:0]             sub_sensed;
  sa_en_t [NSUB-1:0]           sub_sensed_en;

  grd #(.NSUB(NSUB), .AW(SAW)) u_grd (
    .valid (in_valid),
    .all   (all),
    .sel   (sub_sel),
    .en    (sub_en)
  );

  for (genvar s = 0; s < int'(NSUB); s++) begin : g_sub
    sub_cmd_e         cmd;
    act_t             act;
    sa_en_t           sa_en;
    logic [NCOLS-1:0] sub_wdata;
    logic             open;
    logic             done;

    pim_ctrl #(.NCOLS(NCOLS)) u_ctrl (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (sub_en[s]),
      .instr    (instr),
      .in_wdata (wdata),
      .ready    (ctrl_ready[s]),
      .done     (done),
      .rvalid   (ctrl_rvalid[s]),
      .rdata    (ctrl_rdata[s]),
      .cmd      (cmd),
      .act      (act),
      .sa_en    (sa_en),
      .wdata    (sub_wdata),
      .bl_q     (sub_bl[s])
    );

    compute_subarray #(.NROWS(NROWS), .NCOLS(NCOLS)) u_sub (
      .clk         (clk),
      .rst_n       (rst_n),
      .cmd         (cmd),
      .act         (act),
      .sa_en       (sa_en),
      .wdata       (sub_wdata),
      .bl_q        (sub_bl[s]),
      .open_q      (open),
      .sensed_q    (sub_sensed[s]),
      .sensed_en_q (sub_sensed_en[s])
    );
  end

  assign busy     = ~&ctrl_ready;
  assign sub_busy = ~ctrl_ready;

  grb #(.N(NSUB), .NCOLS(NCOLS)) u_grb (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (ctrl_rvalid),
    .in_row    (ctrl_rdata),
    .out_valid (rvalid),
    .out_row   (rdata)
  );

  dpu #(.NSUB(NSUB), .NCOLS(NCOLS)) u_dpu (
    .clk         (clk),
    .rst_n       (rst_n),
    .sensed      (sub_sensed),
    .en          (sub_sensed_en),
    .row         (sub_bl),
    .match       (match),
    .match_valid (match_valid)
  );

  // An instruction may only reach controllers that are idle.
  a_idle_target: assert property (@(posedge clk) disable iff (!rst_n)
    (sub_en & ~ctrl_ready) == '0)
    else $error("instruction sent to a busy sub-array controller");

endmodule
