// mesh_marker -- two-dimensional cell marker: mask of a w x h rectangle whose
// top-left cell is (column x, row y) in a CELLS_X x CELLS_Y array.
//
// One y-axis cell_marker of CELLS_Y entries marks h rows from row y. Each of
// its outputs is the enable (root route signal) of that row's x-axis
// cell_marker of CELLS_X cells, which marks w cells from column x. The
// result is row-major: bit r*CELLS_X + c. Both sides are exact counts, not
// rounded to powers of two; as in cell_marker, x and y should be aligned to
// the next power of two at or above w and h, which the mesh locator provides.
//
// The y-axis marker enabling one x-axis marker per row follows the paper;
// sharing one start column and width among the rows is this design's choice.
// Purely combinational, no clock. CELLS_X and CELLS_Y must be powers of two,
// at least 2.
module mesh_marker #(
  parameter int unsigned CELLS_X = 4,
  parameter int unsigned CELLS_Y = 4
) (
  input  logic                         en,
  input  logic [$clog2(CELLS_X)-1:0]   x,
  input  logic [$clog2(CELLS_Y)-1:0]   y,
  input  logic [$clog2(CELLS_X):0]     w,
  input  logic [$clog2(CELLS_Y):0]     h,
  output logic [CELLS_X*CELLS_Y-1:0]   mask
);

  logic [CELLS_Y-1:0] row_en;

  cell_marker #(.N(CELLS_Y)) u_y_marker (
    .en    (en),
    .s_addr(y),
    .size  (h),
    .mask  (row_en)
  );

  for (genvar r = 0; r < CELLS_Y; r++) begin : g_row
    cell_marker #(.N(CELLS_X)) u_x_marker (
      .en    (row_en[r]),
      .s_addr(x),
      .size  (w),
      .mask  (mask[r*CELLS_X +: CELLS_X])
    );
  end

endmodule
