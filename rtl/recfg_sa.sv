// recfg_sa: one row of reconfigurable sense amplifiers, one per bit-line.
//
// Each amplifier sees the charge shared between the cells raised on its
// bit-line. The bit-line voltage after charge sharing is n/C of Vdd, where n
// is the number of raised cells holding '1' and C the number of raised
// cells. Three inverters with shifted switching points read that voltage:
//   low-Vs  inverter (switches at Vdd/4)  -> NOR2 of two cells
//   normal  inverter (switches at Vdd/2)  -> the plain cell value, or the
//                                            majority of three cells (TRA)
//   high-Vs inverter (switches at 3Vdd/4) -> NAND2 of two cells
// An AND gate with one inverted input forms XOR2 = NAND2 & ~NOR2, and an
// XOR gate combines XOR2 with the carry held in a D-latch to form the sum.
// A 4:1 multiplexer, steered by En_mux/En_c1/En_c2, picks what drives the
// bit-line:
//   En_mux=0             regular sensing (memory read/write, RowClone)
//   En_mux=1, c1c2=10    XNOR2 on BL (XOR2 driven on BL-bar)
//   En_mux=1, c1c2=11    carry: majority of three cells, loaded into the latch
//   En_mux=1, c1c2=00    sum: XOR2 ^ latched carry
// The analog voltages are replaced by the exact threshold comparisons
// 4n < C, 2n > C and 4n < 3C on the count n, so this is the digital
// equivalent of the circuit, not a circuit model. Choices of this design:
// an exact Vdd/2 tie on the normal inverter (two cells, one '1') resolves to
// 0; c1c2=01 is not used and falls back to regular sensing; the latch loads
// only in carry mode and holds (feeding the XOR gate) in sum mode; with
// En_x low the amplifiers are off and drive 0.
//
// Interface: cnt1/cnt0 give n per bit-line as two bit-vectors, nrows gives
// C. bl is combinational and valid in the cycle sense is high; the latch is
// written at the clock edge that ends that cycle. latch_rst clears it.
module recfg_sa
  import pim_pkg::*;
#(
  parameter int unsigned W = COLS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sense,      // charge sharing resolved this cycle
  input  sa_en_t       en,
  input  logic [1:0]   nrows,      // C: raised cells per bit-line (1..3)
  input  logic [W-1:0] cnt0,       // n, bit 0, per bit-line
  input  logic [W-1:0] cnt1,       // n, bit 1, per bit-line
  input  logic         latch_rst,
  output logic [W-1:0] bl,         // value the SA drives onto BL
  output logic [W-1:0] carry_q     // D-latch contents
);

  logic [W-1:0] out_norm;   // BL after normal-Vs sensing (non-inverted)
  logic [W-1:0] nor2;       // low-Vs inverter output
  logic [W-1:0] nand2;      // high-Vs inverter output
  logic [W-1:0] xor2;
  logic         carry_load;

  always_comb begin
    for (int i = 0; i < int'(W); i++) begin
      int n;
      int c;
      n = int'({cnt1[i], cnt0[i]});
      c = int'(nrows);
      nor2[i]     = (4 * n) < c;
      nand2[i]    = (4 * n) < (3 * c);
      out_norm[i] = (2 * n) > c;
    end
    xor2 = nand2 & ~nor2;
  end

  always_comb begin
    if (!en.en_x) begin
      bl = '0;
    end else if (!en.en_mux) begin
      bl = out_norm;
    end else begin
      unique case ({en.en_c1, en.en_c2})
        2'b10:   bl = ~xor2;
        2'b11:   bl = out_norm;
        2'b00:   bl = en.latch_en ? (xor2 ^ carry_q) : xor2;
        default: bl = out_norm;
      endcase
    end
  end

  assign carry_load = sense && en.en_x && en.en_mux && en.en_c1 && en.en_c2 && en.latch_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          carry_q <= '0;
    else if (latch_rst)  carry_q <= '0;
    else if (carry_load) carry_q <= out_norm;
  end

endmodule
