// tb_cell_locator -- checks the buddy free-cell locator against a brute-force
// search.
//
// The reference walks every aligned block of 2^level cells in address order
// and returns the first one whose cells are all 0. Three instances are
// checked: N = 8 exhaustively (every bit array, every level, including one
// level above log2 N, which must give valid = 0), and N = 16 and N = 128 with
// random bit arrays biased towards full so that small and large levels both
// hit and miss. The 8-cell example of the paper's allocation figure
// (array 1,1,0,1,0,0,1,1 from address 0, request of 2 cells) must return
// address 4. A watchdog ends the run after a fixed number of clock cycles.
module tb_cell_locator;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [7:0]   c8;   logic [1:0] l8;   logic v8;   logic [2:0] a8;
  logic [15:0]  c16;  logic [2:0] l16;  logic v16;  logic [3:0] a16;
  logic [127:0] c128; logic [2:0] l128; logic v128; logic [6:0] a128;

  cell_locator #(.N(8))   d8   (.cells(c8),   .level(l8),   .valid(v8),   .addr(a8));
  cell_locator #(.N(16))  d16  (.cells(c16),  .level(l16),  .valid(v16),  .addr(a16));
  cell_locator #(.N(128)) d128 (.cells(c128), .level(l128), .valid(v128), .addr(a128));

  // First free aligned block of 2^lvl cells in an n-cell array, -1 if none.
  function automatic int ref_find(input logic [127:0] cells, input int n, input int lvl);
    int bs;
    bs = 1 << lvl;
    if (bs > n) return -1;
    for (int s = 0; s < n; s += bs) begin
      logic busy;
      busy = 1'b0;
      for (int k = 0; k < bs; k++) busy |= cells[s+k];
      if (!busy) return s;
    end
    return -1;
  endfunction

  task automatic compare(input string tag, input int exp, input logic v, input int a);
    checks++;
    if ((exp < 0 && v) || (exp >= 0 && (!v || a != exp))) begin
      failures++;
      $display("%s: valid %0d addr %0d, expected %0d", tag, v, a, exp);
    end
  endtask

  function automatic logic [127:0] rand_cells(input int n);
    logic [127:0] r;
    int density;
    density = $urandom_range(0, 100);
    r = '0;
    for (int i = 0; i < n; i++) r[i] = ($urandom_range(0, 99) < density);
    return r;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Paper example: 11010011 (address 0 first), two cells -> address 4.
    c8 = 8'b1100_1011; l8 = 2'd1;
    @(posedge clk);
    checks++;
    if (!v8 || a8 != 3'd4) begin
      failures++; $display("example: valid %0d addr %0d, expected address 4", v8, a8);
    end

    for (int c = 0; c < 256; c++) begin
      for (int l = 0; l < 4; l++) begin
        c8 = 8'(c); l8 = 2'(l);
        @(posedge clk);
        compare($sformatf("N=8 cells=%b level=%0d", c8, l), ref_find(128'(c8), 8, l), v8, int'(a8));
      end
    end

    for (int t = 0; t < 1500; t++) begin
      c16  = 16'(rand_cells(16));
      l16  = 3'($urandom_range(0, 5));
      c128 = rand_cells(128);
      if (t % 3 == 0) c128 = c128 & rand_cells(128);
      l128 = 3'($urandom_range(0, 7));
      @(posedge clk);
      compare($sformatf("N=16 level=%0d", l16), ref_find(128'(c16), 16, int'(l16)), v16, int'(a16));
      compare($sformatf("N=128 level=%0d", l128), ref_find(c128, 128, int'(l128)), v128, int'(a128));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
