// grb: global row buffer.
//
// Captures the row offered by whichever of its N sources pulses valid and
// holds it until the next capture, presenting it with a one-cycle out_valid
// pulse. If several sources pulse together their rows are ORed (only one is
// expected). Used between the sub-arrays of a MAT and the bank, and between
// the MATs of a bank and the chip I/O.
module grb #(
  parameter int unsigned N     = 8,
  parameter int unsigned NCOLS = 256
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [N-1:0]            in_valid,
  input  logic [N-1:0][NCOLS-1:0] in_row,
  output logic                    out_valid,
  output logic [NCOLS-1:0]        out_row
);

  logic [NCOLS-1:0] sel_row;

  always_comb begin
    sel_row = '0;
    for (int i = 0; i < int'(N); i++) begin
      if (in_valid[i]) sel_row = sel_row | in_row[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_row   <= '0;
    end else begin
      out_valid <= |in_valid;
      if (|in_valid) out_row <= sel_row;
    end
  end

endmodule
