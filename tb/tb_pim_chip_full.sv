// tb_pim_chip_full: the chip at its default size (8 banks x 16 MATs x 8
// sub-arrays of 1024 x 256) taken through the end-to-end kernels of
// tb_pim_chip: k-mer counting (k = 5 example) in the last sub-array of the
// chip, vertex degree in all eight sub-arrays of MAT 0 of bank 0 and two
// sub-arrays working in parallel. The k-length sweep is left out to keep the
// run short. See tb_host.
module tb_pim_chip_full;
  import pim_pkg::*;

  localparam int unsigned NFLAG = 8 * 16 * 8;

  logic             clk = 1'b0;
  logic             rst_n;
  logic             cmd_valid, cmd_ready;
  scope_e           cmd_scope;
  logic [2:0]       cmd_bank;
  logic [3:0]       cmd_mat;
  logic [2:0]       cmd_sub;
  instr_t           cmd_instr;
  logic [COLS-1:0]  cmd_wdata;
  logic             rvalid;
  logic [COLS-1:0]  rdata;
  logic [NFLAG-1:0] match, match_valid;

  always #5 clk = ~clk;

  pim_chip dut (.*);

  tb_host #(.NBANK(8), .NMAT(16), .NSUB(8)) host (.*);

endmodule
