// row_decoder: regular one-hot row decoder.
//
// Raises exactly one of N word lines, the one addressed by addr, while en is
// high, and none otherwise or when addr is out of range. Used as the data-row
// decoder of a sub-array (N = 1016). Purely combinational.
module row_decoder #(
  parameter int unsigned N  = 1016,
  parameter int unsigned AW = $clog2(N)
) (
  input  logic          en,
  input  logic [AW-1:0] addr,
  output logic [N-1:0]  wl
);

  always_comb begin
    wl = '0;
    if (en && (int'(addr) < int'(N))) wl[addr] = 1'b1;
  end

endmodule
