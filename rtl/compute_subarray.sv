// compute_subarray: one computational DRAM sub-array (1024 rows x 256 bit-lines).
//
// Rows 0..1015 are data rows behind the regular row decoder (row_decoder);
// rows 1016..1023 are the computation rows x1..x8 behind the modified row
// decoder (mrd), which may raise up to three of them at once. Below the
// cells sits one reconfigurable sense amplifier per bit-line (recfg_sa).
//
// The array is driven by DRAM-style commands, one per clock (memory cycle):
//   CMD_ACT with the bit-lines precharged: the raised cells share charge,
//     the SA row resolves them according to sa_en (read, XNOR2, carry or
//     sum) and the result is restored into every raised cell, exactly as a
//     DRAM activation overwrites the cells it opens. The result is held in
//     bl_q (the row buffer) and the rows stay open.
//   CMD_ACT with rows already open: the newly raised rows take the held
//     bit-line value (RowClone copy); nothing is re-sensed.
//   CMD_WR: the write data is driven onto the bit-lines and into the open
//     rows (the data row opened last and every open computation row).
//   CMD_PRE: all rows close and the bit-lines return to Vdd/2.
//   CMD_LRST: clears the carry latches of the SA row.
// An ACTIVATE raises either one data row or one to three computation rows;
// mixing data and computation rows in one ACTIVATE is not supported. The
// command semantics follow the ACTIVATE-ACTIVATE-PRECHARGE description of
// the platform; the exact encoding is this design's own.
//
// Outputs: bl_q is the value on the bit-lines while rows are open; sensed_q
// pulses for one cycle after a charge-sharing sense, with sensed_mode_q
// telling which SA function produced bl_q. The cell array has no reset.
module compute_subarray
  import pim_pkg::*;
#(
  parameter int unsigned NROWS = ROWS,
  parameter int unsigned NCOLS = COLS,
  parameter int unsigned NCOMP = COMP_ROWS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  sub_cmd_e         cmd,
  input  act_t             act,
  input  sa_en_t           sa_en,
  input  logic [NCOLS-1:0] wdata,
  output logic [NCOLS-1:0] bl_q,
  output logic             open_q,
  output logic             sensed_q,
  output sa_en_t           sensed_en_q
);

  localparam int unsigned NDATA = NROWS - NCOMP;
  localparam int unsigned CAW   = $clog2(NCOMP);

  logic [NCOLS-1:0] data_mem [NDATA];
  logic [NCOLS-1:0] comp_mem [NCOMP];

  // ---------------------------------------------------------------- decode
  logic             is_act;
  logic             act_comp;          // the ACTIVATE targets computation rows
  logic [NDATA-1:0] wl_d;              // data-row word lines
  logic [NCOMP-1:0] wl_x;              // computation-row word lines
  logic [2:0][CAW-1:0] comp_addr;

  assign is_act   = (cmd == CMD_ACT);
  assign act_comp = (int'(act.addr[0]) >= int'(NDATA));

  always_comb begin
    for (int k = 0; k < 3; k++) comp_addr[k] = CAW'(int'(act.addr[k]) - int'(NDATA));
  end

  row_decoder #(.N(NDATA), .AW(ROW_AW)) u_rd (
    .en   (is_act && !act_comp),
    .addr (act.addr[0]),
    .wl   (wl_d)
  );

  mrd #(.N(NCOMP), .AW(CAW)) u_mrd (
    .en    (is_act && act_comp),
    .nrows (act.nrows),
    .addr  (comp_addr),
    .wl    (wl_x)
  );

  // ---------------------------------------------------------- charge sharing
  // Per bit-line count of raised cells holding '1', kept as two bit-vectors.
  logic [NCOLS-1:0] cnt0, cnt1;
  logic [1:0]       nraised;

  always_comb begin
    logic [NCOLS-1:0] drow;
    drow = '0;
    for (int r = 0; r < int'(NDATA); r++) begin
      if (wl_d[r]) drow = drow | data_mem[r];
    end
    cnt0 = '0;
    cnt1 = '0;
    if (|wl_d) begin
      cnt0 = drow;
    end
    for (int r = 0; r < int'(NCOMP); r++) begin
      if (wl_x[r]) begin
        cnt1 = cnt1 | (cnt0 & comp_mem[r]);
        cnt0 = cnt0 ^ comp_mem[r];
      end
    end
    nraised = act_comp ? act.nrows : 2'd1;
  end

  // ------------------------------------------------------------ SA row
  logic             sense;
  logic [NCOLS-1:0] sa_bl;
  logic [NCOLS-1:0] carry_q;

  assign sense = is_act && !open_q;

  recfg_sa #(.W(NCOLS)) u_sa (
    .clk       (clk),
    .rst_n     (rst_n),
    .sense     (sense),
    .en        (sa_en),
    .nrows     (nraised),
    .cnt0      (cnt0),
    .cnt1      (cnt1),
    .latch_rst (cmd == CMD_LRST),
    .bl        (sa_bl),
    .carry_q   (carry_q)
  );

  // -------------------------------------------------- bit-lines and rows
  // Data rows are written through one port: an ACTIVATE restores (or, when
  // rows are already open, clones into) the row it raises; a WRITE goes to
  // the data row opened last. Computation rows are written wherever their
  // word line is raised or open.
  logic             open_d_v;          // a data row is open
  row_addr_t        open_d_addr;       // the data row opened last
  logic [NCOMP-1:0] open_x;            // computation rows currently open
  logic [NCOLS-1:0] bl_next;
  logic             we_d;
  row_addr_t        wa_d;
  logic [NCOMP-1:0] we_x;

  always_comb begin
    bl_next = bl_q;
    we_d    = 1'b0;
    wa_d    = act.addr[0];
    we_x    = '0;
    unique case (cmd)
      CMD_ACT: begin
        if (!open_q) bl_next = sa_bl;
        we_d = |wl_d;
        we_x = wl_x;
      end
      CMD_WR: begin
        if (open_q) begin
          bl_next = wdata;
          we_d    = open_d_v;
          wa_d    = open_d_addr;
          we_x    = open_x;
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (we_d) data_mem[wa_d] <= bl_next;
    for (int r = 0; r < int'(NCOMP); r++) begin
      if (we_x[r]) comp_mem[r] <= bl_next;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bl_q        <= '0;
      open_q      <= 1'b0;
      open_d_v    <= 1'b0;
      open_d_addr <= '0;
      open_x      <= '0;
      sensed_q    <= 1'b0;
      sensed_en_q <= '0;
    end else begin
      sensed_q <= sense;
      if (sense) sensed_en_q <= sa_en;
      unique case (cmd)
        CMD_ACT: begin
          bl_q   <= bl_next;
          open_q <= 1'b1;
          if (|wl_d) begin
            open_d_v    <= 1'b1;
            open_d_addr <= act.addr[0];
          end
          open_x <= open_x | wl_x;
        end
        CMD_WR: bl_q <= bl_next;
        CMD_PRE: begin
          open_q   <= 1'b0;
          open_d_v <= 1'b0;
          open_x   <= '0;
        end
        default: ;
      endcase
    end
  end

  // An ACTIVATE raises one data row, or one to three computation rows.
  a_act_rows: assert property (@(posedge clk) disable iff (!rst_n)
    is_act |-> (act.nrows inside {2'd1, 2'd2, 2'd3}) && (act_comp || act.nrows == 2'd1))
    else $error("illegal ACTIVATE row set");
  a_wr_open: assert property (@(posedge clk) disable iff (!rst_n)
    (cmd == CMD_WR) |-> open_q)
    else $error("WRITE with no open row");

endmodule
