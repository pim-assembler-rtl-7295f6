// tb_pim_chip: end-to-end test of the chip at a reduced size (2 banks of
// 2 MATs of 2 sub-arrays; sub-arrays keep their full 1024 x 256 size).
// The host driver runs k-mer counting (the k = 5 example and k = 16, 22, 26,
// 32 on random reads), vertex-degree computation and two sub-arrays in
// parallel, and checks them; see tb_host.
module tb_pim_chip;
  import pim_pkg::*;

  localparam int unsigned NBANK = 2;
  localparam int unsigned NMAT  = 2;
  localparam int unsigned NSUB  = 2;
  localparam int unsigned NFLAG = NBANK * NMAT * NSUB;

  logic             clk = 1'b0;
  logic             rst_n;
  logic             cmd_valid, cmd_ready;
  scope_e           cmd_scope;
  logic [0:0]       cmd_bank, cmd_mat, cmd_sub;
  instr_t           cmd_instr;
  logic [COLS-1:0]  cmd_wdata;
  logic             rvalid;
  logic [COLS-1:0]  rdata;
  logic [NFLAG-1:0] match, match_valid;

  always #5 clk = ~clk;

  pim_chip #(.NBANK(NBANK), .NMAT(NMAT), .NSUB(NSUB)) dut (.*);

  tb_host #(.NBANK(NBANK), .NMAT(NMAT), .NSUB(NSUB), .WATCHDOG_CYCLES(2000000),
            .KSWEEP(1'b1)) host (.*);

endmodule
