// cbm_err_comp: data-dependent error compensation for a truncated Booth
// sub-multiplier.
//
// When truncation omits the partial-product bits below the kept columns, each
// partial-product row that has bits in the omitted region and a non-zero Booth
// digit loses on average about half a unit of the lowest kept column; a row
// with a zero digit loses nothing. The compensation added at the lowest kept
// column is therefore round(N / 2) = (N + 1) >> 1, where N is the number of
// such rows with a non-zero digit (the complement of the zero-digit flags the
// Booth encoder already produces). The architecture states that compensation
// values are added when truncating; this particular estimate is this design's
// choice. Purely combinational.
module cbm_err_comp #(
  parameter int unsigned ROWS = 4  // rows with bits below the kept columns
) (
  input  logic [ROWS-1:0]           nz,    // row k has a non-zero Booth digit
  output logic [$clog2(ROWS+2)-1:0] comp   // value added at the lowest kept column
);
  localparam int unsigned CW = $clog2(ROWS + 2);

  logic [CW-1:0] n;

  always_comb begin
    n = '0;
    for (int k = 0; k < ROWS; k++) n = n + CW'(nz[k]);
    comp = CW'((n + CW'(1)) >> 1);
  end

endmodule
