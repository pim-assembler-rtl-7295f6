// pim_ctrl: controller of one computational sub-array (command decoder and
// timing control).
//
// It accepts one instruction at a time and expands it into sub-array
// commands, one command per memory cycle:
//   OP_AAP1 (src, des, size)             ACT src | ACT des | PRE   (row copy)
//   OP_AAP2 (src1, src2, des, size)      ACT {src1,src2} in XNOR2 or sum mode
//                                        | ACT des | PRE
//   OP_AAP3 (src1, src2, src3, des, size) ACT {src1,src2,src3} in carry mode
//                                        | ACT des | PRE
//   OP_WRITE (des)                       ACT des | WR | PRE
//   OP_READ (src1)                       ACT src1 | PRE, row returned on rdata
//   OP_LRST                              LRST (clear carry latches)
// The three AAP types and their ACTIVATE-ACTIVATE-PRECHARGE sequence follow
// the platform's instruction set; size counts rows and repeats the sequence
// with every address stepped by one. The sa_en set for each phase is the
// one of the SA control-signal table. OP_WRITE, OP_READ, OP_LRST, the
// one-command-per-clock timing and the instruction encoding are this
// design's own.
//
// Handshake: an instruction is taken when in_valid is high and ready is
// high (ready = idle). An AAP of size s then issues 3*s commands on the
// following 3*s clocks; done pulses for one clock after the last PRE.
// For OP_READ, rvalid pulses together with done and rdata holds the row.
module pim_ctrl
  import pim_pkg::*;
#(
  parameter int unsigned NCOLS = COLS
) (
  input  logic             clk,
  input  logic             rst_n,
  // instruction side
  input  logic             in_valid,
  input  instr_t           instr,
  input  logic [NCOLS-1:0] in_wdata,
  output logic             ready,
  output logic             done,
  output logic             rvalid,
  output logic [NCOLS-1:0] rdata,
  // sub-array side
  output sub_cmd_e         cmd,
  output act_t             act,
  output sa_en_t           sa_en,
  output logic [NCOLS-1:0] wdata,
  input  logic [NCOLS-1:0] bl_q
);

  typedef enum logic [2:0] {
    S_IDLE,
    S_ACT1,   // first ACTIVATE (sources)
    S_ACT2,   // second ACTIVATE (destination)
    S_WR,     // drive write data
    S_PRE,    // PRECHARGE
    S_LRST    // latch reset
  } state_e;

  state_e           state_q;
  instr_t           ins_q;
  logic [NCOLS-1:0] wdata_q;
  row_addr_t        idx_q;           // row index within the size-long loop
  row_addr_t        last_q;          // size-1

  assign ready = (state_q == S_IDLE);
  assign wdata = wdata_q;

  // ------------------------------------------------ command decoder
  always_comb begin
    cmd   = CMD_NOP;
    act   = '0;
    sa_en = sa_enables(SA_RW);
    unique case (state_q)
      S_ACT1: begin
        cmd = CMD_ACT;
        unique case (ins_q.op)
          OP_AAP2: begin
            act.nrows   = 2'd2;
            act.addr[0] = ins_q.src1 + idx_q;
            act.addr[1] = ins_q.src2 + idx_q;
            sa_en       = sa_enables(ins_q.func);
          end
          OP_AAP3: begin
            act.nrows   = 2'd3;
            act.addr[0] = ins_q.src1 + idx_q;
            act.addr[1] = ins_q.src2 + idx_q;
            act.addr[2] = ins_q.src3 + idx_q;
            sa_en       = sa_enables(SA_CARRY);
          end
          OP_WRITE: begin
            act.nrows   = 2'd1;
            act.addr[0] = ins_q.des;
          end
          default: begin            // OP_AAP1, OP_READ
            act.nrows   = 2'd1;
            act.addr[0] = ins_q.src1 + idx_q;
          end
        endcase
      end
      S_ACT2: begin
        cmd         = CMD_ACT;
        act.nrows   = 2'd1;
        act.addr[0] = ins_q.des + idx_q;
      end
      S_WR:   cmd = CMD_WR;
      S_PRE:  cmd = CMD_PRE;
      S_LRST: cmd = CMD_LRST;
      default: ;
    endcase
  end

  // ------------------------------------------------ timing control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      ins_q   <= '0;
      wdata_q <= '0;
      idx_q   <= '0;
      last_q  <= '0;
      done    <= 1'b0;
      rvalid  <= 1'b0;
      rdata   <= '0;
    end else begin
      done   <= 1'b0;
      rvalid <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          if (in_valid) begin
            ins_q   <= instr;
            wdata_q <= in_wdata;
            idx_q   <= '0;
            last_q  <= (instr.size == '0) ? '0 : instr.size - 1'b1;
            unique case (instr.op)
              OP_AAP1, OP_AAP2, OP_AAP3, OP_WRITE, OP_READ: state_q <= S_ACT1;
              OP_LRST: state_q <= S_LRST;
              default: done    <= 1'b1;
            endcase
          end
        end
        S_ACT1: begin
          unique case (ins_q.op)
            OP_WRITE: state_q <= S_WR;
            OP_READ:  state_q <= S_PRE;
            default:  state_q <= S_ACT2;
          endcase
        end
        S_ACT2: state_q <= S_PRE;
        S_WR:   state_q <= S_PRE;
        S_PRE: begin
          if (ins_q.op == OP_READ) begin
            rdata  <= bl_q;
            rvalid <= 1'b1;
          end
          if (idx_q == last_q || ins_q.op inside {OP_WRITE, OP_READ}) begin
            state_q <= S_IDLE;
            done    <= 1'b1;
          end else begin
            idx_q   <= idx_q + 1'b1;
            state_q <= S_ACT1;
          end
        end
        S_LRST: begin
          state_q <= S_IDLE;
          done    <= 1'b1;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // AAP2 must name an XNOR2 or sum function
  a_aap2_func: assert property (@(posedge clk) disable iff (!rst_n)
    (ready && in_valid && instr.op == OP_AAP2) |-> (instr.func inside {SA_XNOR, SA_SUM}))
    else $error("AAP2 with function %0d", instr.func);

endmodule
