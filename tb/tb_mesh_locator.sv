// tb_mesh_locator -- checks the submesh locator against a brute-force search.
//
// The reference visits the aligned submeshes of the requested shape row by
// row, left to right, and returns the first whose cells are all free. The
// 4 x 4 default is run with random occupancy maps of varying density over all
// nine shapes from 1 x 1 to 4 x 4, plus shape codes beyond the array, which
// must give valid = 0. A second instance of 8 columns by 4 rows checks a
// non-square array. A watchdog ends the run after a fixed number of cycles.
module tb_mesh_locator;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [15:0] c44; logic [1:0] lw44, lh44; logic v44; logic [1:0] x44, y44;
  logic [31:0] c84; logic [1:0] lw84, lh84; logic v84; logic [2:0] x84; logic [1:0] y84;

  mesh_locator #(.CELLS_X(4), .CELLS_Y(4)) d44 (.cells(c44), .lw(lw44), .lh(lh44),
                                                .valid(v44), .x(x44), .y(y44));
  mesh_locator #(.CELLS_X(8), .CELLS_Y(4)) d84 (.cells(c84), .lw(lw84), .lh(lh84),
                                                .valid(v84), .x(x84), .y(y84));

  // Returns y*cx + x of the first free submesh, or -1.
  function automatic int ref_find(input logic [31:0] cells, input int cx, input int cy,
                                  input int lw, input int lh);
    int w, h;
    w = 1 << lw; h = 1 << lh;
    if (w > cx || h > cy) return -1;
    for (int y = 0; y < cy; y += h)
      for (int x = 0; x < cx; x += w) begin
        logic busy;
        busy = 1'b0;
        for (int j = 0; j < h; j++)
          for (int i = 0; i < w; i++) busy |= cells[(y+j)*cx + x + i];
        if (!busy) return y*cx + x;
      end
    return -1;
  endfunction

  function automatic logic [31:0] rand_cells();
    logic [31:0] r;
    int density;
    density = $urandom_range(0, 90);
    for (int i = 0; i < 32; i++) r[i] = ($urandom_range(0, 99) < density);
    return r;
  endfunction

  task automatic compare(input string tag, input int exp, input int cx, input logic v,
                         input int x, input int y);
    checks++;
    if ((exp < 0 && v) || (exp >= 0 && (!v || y*cx + x != exp))) begin
      failures++;
      $display("%s: valid %0d at (%0d,%0d), expected index %0d", tag, v, x, y, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      c44 = 16'(rand_cells()); lw44 = 2'($urandom_range(0, 3)); lh44 = 2'($urandom_range(0, 3));
      c84 = rand_cells();      lw84 = 2'($urandom_range(0, 3)); lh84 = 2'($urandom_range(0, 3));
      @(posedge clk);
      compare($sformatf("4x4 %h shape 2^%0d x 2^%0d", c44, lw44, lh44),
              ref_find(32'(c44), 4, 4, int'(lw44), int'(lh44)), 4, v44, int'(x44), int'(y44));
      compare($sformatf("8x4 %h shape 2^%0d x 2^%0d", c84, lw84, lh84),
              ref_find(c84, 8, 4, int'(lw84), int'(lh84)), 8, v84, int'(x84), int'(y84));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
