// tb_mesh_marker -- checks the two-dimensional marker against a rectangle
// drawn cell by cell.
//
// For the 4 x 4 default every width and height from 0 to 4 is tried at every
// corner aligned to the next power of two at or above that side, with the
// enable on and off; the expected mask has a 1 at (c, r) exactly when
// x <= c < x+w and y <= r < y+h. An 8 x 4 instance is checked with random
// aligned requests. A watchdog ends the run after a fixed number of cycles.
module tb_mesh_marker;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic en44; logic [1:0] x44, y44; logic [2:0] w44, h44; logic [15:0] m44;
  logic en84; logic [2:0] x84; logic [1:0] y84; logic [3:0] w84; logic [2:0] h84; logic [31:0] m84;

  mesh_marker #(.CELLS_X(4), .CELLS_Y(4)) d44 (.en(en44), .x(x44), .y(y44), .w(w44), .h(h44), .mask(m44));
  mesh_marker #(.CELLS_X(8), .CELLS_Y(4)) d84 (.en(en84), .x(x84), .y(y84), .w(w84), .h(h84), .mask(m84));

  function automatic logic [31:0] ref_rect(input int cx, input int x, input int y,
                                           input int w, input int h);
    logic [31:0] m;
    m = '0;
    for (int r = y; r < y + h; r++)
      for (int c = x; c < x + w; c++) m[r*cx + c] = 1'b1;
    return m;
  endfunction

  function automatic int align(input int n);
    int a;
    a = 1;
    while (a < n) a = a * 2;
    return a;
  endfunction

  task automatic compare(input string tag, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: mask %h, expected %h", tag, got, exp);
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
    en84 = 1'b0; x84 = '0; y84 = '0; w84 = '0; h84 = '0;
    for (int w = 0; w <= 4; w++)
      for (int h = 0; h <= 4; h++)
        for (int x = 0; x < 4; x += align(w))
          for (int y = 0; y < 4; y += align(h))
            for (int e = 0; e < 2; e++) begin
              en44 = e[0]; x44 = 2'(x); y44 = 2'(y); w44 = 3'(w); h44 = 3'(h);
              @(posedge clk);
              compare($sformatf("4x4 en=%0d (%0d,%0d) %0dx%0d", e, x, y, w, h), 32'(m44),
                      e[0] ? ref_rect(4, x, y, w, h) : '0);
            end

    en84 = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      int w, h, x, y;
      w = $urandom_range(0, 8); h = $urandom_range(0, 4);
      x = ($urandom_range(0, 7) / align(w)) * align(w);
      y = ($urandom_range(0, 3) / align(h)) * align(h);
      x84 = 3'(x); y84 = 2'(y); w84 = 4'(w); h84 = 3'(h);
      @(posedge clk);
      compare($sformatf("8x4 (%0d,%0d) %0dx%0d", x, y, w, h), m84, ref_rect(8, x, y, w, h));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
