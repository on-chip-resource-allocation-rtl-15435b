// mesh_locator -- combinational free-submesh locator for a two-dimensional
// array of CELLS_X columns by CELLS_Y rows.
//
// The occupancy map is laid out row-major: cell (column x, row y) is bit
// y*CELLS_X + x, 1 = used. The request is a submesh of 2^lw columns by 2^lh
// rows. The answer, in one combinational pass, is whether an aligned free
// submesh of that shape exists (valid) and the column x and row y of the
// top-left cell of the first one in row-major order.
//
// A partial OR tree covers every shape: a (2w,h) node ORs two side-by-side
// (w,h) nodes and a (w,2h) node ORs two stacked (w,h) nodes, so for a 4 x 4
// mesh there are nodes of sizes (2,1), (4,1), (1,2), (2,2), (1,4), (4,2),
// (2,4) and (4,4). The OR outputs of the requested shape are laid out
// row-major over the grid of submeshes (unused positions read as used) and a
// cell_locator at level 0 finds the first zero; its index is split into the
// submesh column and row and scaled back to cell coordinates.
//
// The partial OR tree and the reuse of the one-dimensional locator on a
// row-major layout follow the paper; the way the two-dimensional address is
// recovered is this design's. CELLS_X and CELLS_Y must be powers of two.
// Purely combinational, no clock.
module mesh_locator #(
  parameter int unsigned CELLS_X = 4,
  parameter int unsigned CELLS_Y = 4
) (
  input  logic [CELLS_X*CELLS_Y-1:0]           cells,
  input  logic [$clog2($clog2(CELLS_X)+1)-1:0] lw,
  input  logic [$clog2($clog2(CELLS_Y)+1)-1:0] lh,
  output logic                                 valid,
  output logic [$clog2(CELLS_X)-1:0]           x,
  output logic [$clog2(CELLS_Y)-1:0]           y
);

  localparam int unsigned N  = CELLS_X * CELLS_Y;
  localparam int unsigned LX = $clog2(CELLS_X);
  localparam int unsigned LY = $clog2(CELLS_Y);
  localparam int unsigned LN = $clog2(N);

  // Block g_w[a].g_h[b] holds in `v` the OR of every aligned 2^a x 2^b
  // submesh; submesh (column bx, row by) sits at bit by*CELLS_X + bx. Bits
  // outside the grid of submeshes are tied to 1 (used). orm collects the
  // levels so that the requested one can be selected.
  logic [N-1:0] orm [LX+1][LY+1];

  for (genvar a = 0; a <= LX; a++) begin : g_w
    for (genvar b = 0; b <= LY; b++) begin : g_h
      logic [N-1:0] v;
      for (genvar yy = 0; yy < CELLS_Y; yy++) begin : g_row
        for (genvar xx = 0; xx < CELLS_X; xx++) begin : g_col
          if (xx >= (CELLS_X >> a) || yy >= (CELLS_Y >> b)) begin : g_pad
            assign v[yy*CELLS_X+xx] = 1'b1;
          end else if (a == 0 && b == 0) begin : g_cell
            assign v[yy*CELLS_X+xx] = cells[yy*CELLS_X+xx];
          end else if (b == 0) begin : g_horiz
            assign v[yy*CELLS_X+xx] = g_w[a-1].g_h[b].v[yy*CELLS_X+2*xx]
                                    | g_w[a-1].g_h[b].v[yy*CELLS_X+2*xx+1];
          end else begin : g_vert
            assign v[yy*CELLS_X+xx] = g_w[a].g_h[b-1].v[(2*yy)*CELLS_X+xx]
                                    | g_w[a].g_h[b-1].v[(2*yy+1)*CELLS_X+xx];
          end
        end
      end
      assign orm[a][b] = v;
    end
  end

  // Row-major layout of the requested shape's submeshes: index by*(CELLS_X>>lw)+bx.
  logic [N-1:0]    flat;
  logic            shape_ok;
  logic            loc_valid;
  logic [LN-1:0]   idx;

  always_comb begin
    int unsigned sw, sh, cols;
    sw       = (32'(lw) > LX) ? LX : 32'(lw);
    sh       = (32'(lh) > LY) ? LY : 32'(lh);
    shape_ok = (32'(lw) <= LX) && (32'(lh) <= LY);
    cols     = CELLS_X >> sw;
    flat     = '1;
    for (int by = 0; by < int'(CELLS_Y); by++) begin
      for (int bx = 0; bx < int'(CELLS_X); bx++) begin
        if (bx < int'(cols) && by < int'(CELLS_Y >> sh)) begin
          flat[by*cols+bx] = orm[sw][sh][by*CELLS_X+bx];
        end
      end
    end
  end

  cell_locator #(.N(N)) u_first_free (
    .cells(flat),
    .level('0),
    .valid(loc_valid),
    .addr (idx)
  );

  always_comb begin
    int unsigned sw, sh, bx, by;
    sw = (32'(lw) > LX) ? LX : 32'(lw);
    sh = (32'(lh) > LY) ? LY : 32'(lh);
    bx = 32'(idx) & ((CELLS_X >> sw) - 1);
    by = 32'(idx) >> (LX - sw);
    x  = LX'(bx << sw);
    y  = LY'(by << sh);
    valid = shape_ok && loc_valid;
  end

endmodule
