// tb_cell_marker -- checks the marking tree against the shift formula.
//
// Expected mask: a run of `size` ones shifted up by the start address,
// ((1 << size) - 1) << start, which is what the tree must produce for every
// start aligned to the next power of two at or above size. N = 8 is checked
// exhaustively over such (start, size) pairs with en = 1, and en = 0 must give
// an empty mask. The two examples of the paper are checked by name: size 5
// from address 0 gives cells 0-4, and size 2 from address 2 gives cells 2-3.
// N = 16 and N = 128 are checked with random aligned requests. A watchdog ends
// the run after a fixed number of clock cycles.
module tb_cell_marker;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic en8, en16, en128;
  logic [2:0] s8;   logic [3:0] z8;   logic [7:0]   m8;
  logic [3:0] s16;  logic [4:0] z16;  logic [15:0]  m16;
  logic [6:0] s128; logic [7:0] z128; logic [127:0] m128;

  cell_marker #(.N(8))   d8   (.en(en8),   .s_addr(s8),   .size(z8),   .mask(m8));
  cell_marker #(.N(16))  d16  (.en(en16),  .s_addr(s16),  .size(z16),  .mask(m16));
  cell_marker #(.N(128)) d128 (.en(en128), .s_addr(s128), .size(z128), .mask(m128));

  function automatic logic [127:0] ref_mask(input int start, input int size);
    logic [127:0] m;
    m = '0;
    for (int k = 0; k < size; k++) m[start+k] = 1'b1;
    return m;
  endfunction

  function automatic int clog2i(input int n);
    int l;
    l = 0;
    while ((1 << l) < n) l++;
    return l;
  endfunction

  task automatic compare(input string tag, input logic [127:0] got, input logic [127:0] exp);
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
    en16 = 1'b0; s16 = '0; z16 = '0; en128 = 1'b0; s128 = '0; z128 = '0;

    // Paper examples.
    en8 = 1'b1; s8 = 3'd0; z8 = 4'd5;
    @(posedge clk);
    compare("five cells from 0", 128'(m8), 128'(8'b0001_1111));
    s8 = 3'd2; z8 = 4'd2;
    @(posedge clk);
    compare("two cells from 2", 128'(m8), 128'(8'b0000_1100));

    for (int size = 0; size <= 8; size++) begin
      for (int start = 0; start < 8; start += (1 << clog2i(size))) begin
        for (int e = 0; e < 2; e++) begin
          en8 = e[0]; s8 = 3'(start); z8 = 4'(size);
          @(posedge clk);
          compare($sformatf("N=8 en=%0d start=%0d size=%0d", e, start, size), 128'(m8),
                  e[0] ? ref_mask(start, size) : '0);
        end
      end
    end

    en16 = 1'b1; en128 = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      int sz16, st16, sz128, st128;
      sz16  = $urandom_range(0, 16);
      st16  = ($urandom_range(0, 15) >> clog2i(sz16)) << clog2i(sz16);
      sz128 = $urandom_range(0, 128);
      st128 = ($urandom_range(0, 127) >> clog2i(sz128)) << clog2i(sz128);
      z16 = 5'(sz16); s16 = 4'(st16); z128 = 8'(sz128); s128 = 7'(st128);
      @(posedge clk);
      compare($sformatf("N=16 start=%0d size=%0d", st16, sz16), 128'(m16), ref_mask(st16, sz16));
      compare($sformatf("N=128 start=%0d size=%0d", st128, sz128), m128, ref_mask(st128, sz128));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
