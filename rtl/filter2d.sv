// filter2d: separable 2-D filter of the bank, built from equal 1-D filters.
//
// L row filters each take one row of the L x L window and share the
// horizontal sign bit b_h; their L normalised outputs form a column that a
// single column filter, with the vertical sign bit b_v, reduces to the
// output sample. The row filters work in parallel, so the longest path is
// two 1-D filters deep. With {b_v, b_h} = 00, 01, 10, 11 the result is the
// LL, HL, LH or HH subband sample of the window (see qmf_pkg). Each 1-D
// stage divides by the sum of its coefficient magnitudes, so the output has
// the input's width and scale.
//
// Interface: win[r][c] is the pixel in row r, column c (signed). Purely
// combinational.
module filter2d #(
  parameter int unsigned L      = 7,
  parameter int unsigned DATA_W = 9
) (
  input  logic signed [DATA_W-1:0] win [L][L],
  input  logic                     b_h,
  input  logic                     b_v,
  output logic signed [DATA_W-1:0] out
);

  logic signed [DATA_W-1:0] row_out [L];

  for (genvar r = 0; r < L; r++) begin : g_row
    fir1d #(.L(L), .DATA_W(DATA_W)) u_row (
      .in (win[r]),
      .b  (b_h),
      .out(row_out[r])
    );
  end

  fir1d #(.L(L), .DATA_W(DATA_W)) u_col (
    .in (row_out),
    .b  (b_v),
    .out(out)
  );

endmodule
