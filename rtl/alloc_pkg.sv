// alloc_pkg -- types and helpers shared by the resource allocator and its
// testbenches.
//
// alloc_op_e names the four requests the allocator serves: allocate or free a
// run of cells in the one-dimensional (array) scheme, and allocate or free a
// rectangular submesh in the two-dimensional (matrix) scheme. The encoding is
// this design's own choice. ceil_log2 turns a requested cell count into the
// buddy level (block of 2^level cells) used by the locators; it is written as a
// loop so that it synthesises to a small priority encoder.
package alloc_pkg;

  typedef enum logic [1:0] {
    OP_ALLOC_ARRAY = 2'd0,
    OP_FREE_ARRAY  = 2'd1,
    OP_ALLOC_MESH  = 2'd2,
    OP_FREE_MESH   = 2'd3
  } alloc_op_e;

  // Smallest l with 2^l >= n, for n >= 1 (0 for n == 0). Counts up to 32 bits.
  function automatic int unsigned ceil_log2(input logic [31:0] n);
    int unsigned l;
    l = 0;
    for (int i = 0; i < 32; i++) begin
      if ((32'd1 << i) < n) l = i + 1;
    end
    return l;
  endfunction

endpackage
