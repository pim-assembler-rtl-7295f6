// grd: global row decoder of a MAT.
//
// Turns a sub-array address into the enable of that sub-array's global word
// line, or enables every sub-array of the MAT at once when all is high, so
// that one instruction runs in several sub-arrays in parallel. Nothing is
// enabled while valid is low or the address is out of range. Combinational.
module grd #(
  parameter int unsigned NSUB = 8,
  parameter int unsigned AW   = (NSUB > 1) ? $clog2(NSUB) : 1
) (
  input  logic            valid,
  input  logic            all,
  input  logic [AW-1:0]   sel,
  output logic [NSUB-1:0] en
);

  always_comb begin
    en = '0;
    if (valid) begin
      if (all) en = '1;
      else if (int'(sel) < int'(NSUB)) en[sel] = 1'b1;
    end
  end

endmodule
