// pim_pkg: types and constants shared by the processing-in-DRAM genome
// assembly platform.
//
// Geometry: a computational sub-array has 1024 rows of 256 bit-lines. The
// lower 1016 rows are data rows reached through the regular row decoder;
// the upper 8 rows (x1..x8) are computation rows reached through the
// modified row decoder, which can raise several of them at once. The data
// rows are split, top to bottom, into a 4-row temp region, a 980-row k-mer
// region and a 32-row value (frequency) region. The placement of the
// compute rows at addresses 1016..1023 is this design's choice.
//
// Sense-amplifier enable sets (En_m, En_x, En_mux, En_c1, En_c2, Latch_En)
// follow the control-signal table of the reconfigurable SA:
//   W/R   : 1 1 0 x x 0
//   XNOR2 : 0 1 1 1 0 0
//   Carry : 1 1 1 1 1 1
//   Sum   : 1 1 1 0 0 1
// Bases are coded A=00, T=01, C=10, G=11.
package pim_pkg;

  localparam int unsigned ROWS       = 1024;
  localparam int unsigned COLS       = 256;
  localparam int unsigned COMP_ROWS  = 8;
  localparam int unsigned DATA_ROWS  = ROWS - COMP_ROWS;   // 1016
  localparam int unsigned ROW_AW     = 10;

  // Row map of the data region (k-mer hash table layout)
  localparam int unsigned TEMP_BASE  = 0;
  localparam int unsigned TEMP_ROWS  = 4;
  localparam int unsigned KMER_BASE  = 4;
  localparam int unsigned KMER_ROWS  = 980;
  localparam int unsigned VALUE_BASE = 984;
  localparam int unsigned VALUE_ROWS = 32;
  localparam int unsigned COMP_BASE  = DATA_ROWS;           // x1 = 1016

  typedef logic [ROW_AW-1:0] row_addr_t;

  // 2-bit nucleotide code
  typedef enum logic [1:0] {
    BASE_A = 2'b00,
    BASE_T = 2'b01,
    BASE_C = 2'b10,
    BASE_G = 2'b11
  } base_e;

  // Enable bits of the reconfigurable sense amplifier
  typedef struct packed {
    logic en_m;
    logic en_x;
    logic en_mux;
    logic en_c1;
    logic en_c2;
    logic latch_en;
  } sa_en_t;

  typedef enum logic [1:0] {
    SA_RW    = 2'd0,
    SA_XNOR  = 2'd1,
    SA_CARRY = 2'd2,
    SA_SUM   = 2'd3
  } sa_mode_e;

  // Enable set for each SA function ("x" entries driven as 0)
  function automatic sa_en_t sa_enables(sa_mode_e mode);
    sa_en_t e;
    unique case (mode)
      SA_RW:    e = '{en_m:1'b1, en_x:1'b1, en_mux:1'b0, en_c1:1'b0, en_c2:1'b0, latch_en:1'b0};
      SA_XNOR:  e = '{en_m:1'b0, en_x:1'b1, en_mux:1'b1, en_c1:1'b1, en_c2:1'b0, latch_en:1'b0};
      SA_CARRY: e = '{en_m:1'b1, en_x:1'b1, en_mux:1'b1, en_c1:1'b1, en_c2:1'b1, latch_en:1'b1};
      SA_SUM:   e = '{en_m:1'b1, en_x:1'b1, en_mux:1'b1, en_c1:1'b0, en_c2:1'b0, latch_en:1'b1};
      default:  e = '0;
    endcase
    return e;
  endfunction

  // Set of word lines raised by one ACTIVATE: up to three rows
  typedef struct packed {
    logic [1:0]           nrows;   // 1..3 rows raised
    logic [2:0][ROW_AW-1:0] addr;  // addr[0] .. addr[nrows-1] are used
  } act_t;

  // Sub-array command bus (one command per memory cycle)
  typedef enum logic [2:0] {
    CMD_NOP  = 3'd0,
    CMD_ACT  = 3'd1,   // ACTIVATE the rows in act_t
    CMD_PRE  = 3'd2,   // PRECHARGE: close rows, bit-lines back to Vdd/2
    CMD_WR   = 3'd3,   // drive write data onto the bit-lines of the open row
    CMD_LRST = 3'd4    // reset the carry latches
  } sub_cmd_e;

  // Instructions understood by the sub-array controller
  typedef enum logic [2:0] {
    OP_NOP   = 3'd0,
    OP_AAP1  = 3'd1,   // AAP(src, des, size): row copy (RowClone)
    OP_AAP2  = 3'd2,   // AAP(src1, src2, des, size): two-row activation
    OP_AAP3  = 3'd3,   // AAP(src1, src2, src3, des, size): triple-row activation
    OP_WRITE = 3'd4,   // host writes one row
    OP_READ  = 3'd5,   // host reads one row
    OP_LRST  = 3'd6    // clear the carry latches before an addition
  } opcode_e;

  typedef struct packed {
    opcode_e     op;
    sa_mode_e    func;   // OP_AAP2: SA_XNOR or SA_SUM
    row_addr_t   src1;
    row_addr_t   src2;
    row_addr_t   src3;
    row_addr_t   des;
    row_addr_t   size;   // number of consecutive rows (0 is taken as 1)
  } instr_t;

  // How many sub-arrays one instruction reaches
  typedef enum logic [1:0] {
    SC_SUB  = 2'd0,    // the addressed sub-array
    SC_MAT  = 2'd1,    // every sub-array of the addressed MAT
    SC_BANK = 2'd2,    // every sub-array of the addressed bank
    SC_CHIP = 2'd3     // every sub-array of the chip
  } scope_e;

endpackage
