// mrd: modified row decoder of the eight computation rows x1..x8.
//
// A regular 3:8 decoder raises one word line. The modified decoder adds two
// transistors to each word-line driver so that several drivers can be held
// on together; here that is an OR of up to three 3:8 decodes. nrows selects
// how many of addr[0..2] take part (0 raises nothing, values above 3 are
// treated as 3). Purely combinational.
module mrd #(
  parameter int unsigned N  = 8,
  parameter int unsigned AW = $clog2(N)
) (
  input  logic                  en,
  input  logic [1:0]            nrows,
  input  logic [2:0][AW-1:0]    addr,
  output logic [N-1:0]          wl
);

  always_comb begin
    wl = '0;
    if (en) begin
      for (int k = 0; k < 3; k++) begin
        if (k < int'(nrows)) wl[addr[k]] = 1'b1;
      end
    end
  end

endmodule
