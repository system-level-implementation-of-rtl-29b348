// ppma_expand: noise-tolerance expansion of one template row (step 3 of PPMA).
//
// Every object pixel (1) of the template is copied into the SIGMA rows above
// and the SIGMA rows below it. Seen from the output, row r of the expanded
// template is the bitwise OR of template rows r-SIGMA .. r+SIGMA; rows that
// fall outside the image are not wrapped around (the vertical, radial axis is
// not cyclic), they simply do not contribute. The whole template is an input,
// so the expansion is exact across tile boundaries.
//
// Purely combinational: exp_row follows tmpl and row in the same cycle.
// The OR-window formulation is this design's way of realising the step; the
// step itself and SIGMA = 2 are the original algorithm's.
module ppma_expand #(
  parameter int unsigned IMG   = ppma_pkg::IMG_DEFAULT,
  parameter int unsigned SIGMA = ppma_pkg::SIGMA_DEFAULT,
  localparam int unsigned RW   = $clog2(IMG)
) (
  input  logic [IMG-1:0] tmpl [IMG],  // template rows, bit c = column c
  input  logic [RW-1:0]  row,         // row to produce
  output logic [IMG-1:0] exp_row      // expanded row
);

  always_comb begin
    exp_row = '0;
    for (int d = -int'(SIGMA); d <= int'(SIGMA); d++) begin
      if (int'(row) + d >= 0 && int'(row) + d < int'(IMG))
        exp_row |= tmpl[int'(row) + d];
    end
  end

endmodule
