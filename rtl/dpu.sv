// dpu: digital processing unit of a MAT.
//
// After an in-memory XNOR2 compares a query row (temp) with a stored k-mer
// row, every bit-line carries '1' where the two rows agree. The DPU ANDs all
// bit-lines of that result: '1' means the k-mer is already in the table, so
// the next memory operation is a frequency update, '0' means it is a new
// k-mer to insert. One AND tree serves each sub-array of the MAT.
//
// Interface: for sub-array s, sensed[s] pulses for one cycle after a sense
// whose enable set was en[s]; when that set is the XNOR2 set, match[s] takes
// &row[s] and match_valid[s] pulses one cycle later. Rows not written by the
// k-mer are expected to be padded identically in both operands.
module dpu
  import pim_pkg::*;
#(
  parameter int unsigned NSUB  = 8,
  parameter int unsigned NCOLS = COLS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [NSUB-1:0]            sensed,
  input  sa_en_t [NSUB-1:0]          en,
  input  logic [NSUB-1:0][NCOLS-1:0] row,
  output logic [NSUB-1:0]            match,
  output logic [NSUB-1:0]            match_valid
);

  localparam sa_en_t XNOR_EN = sa_enables(SA_XNOR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      match       <= '0;
      match_valid <= '0;
    end else begin
      for (int s = 0; s < int'(NSUB); s++) begin
        match_valid[s] <= 1'b0;
        if (sensed[s] && en[s] == XNOR_EN) begin
          match[s]       <= &row[s];
          match_valid[s] <= 1'b1;
        end
      end
    end
  end

endmodule
