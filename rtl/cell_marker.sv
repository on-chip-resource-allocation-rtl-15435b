// cell_marker -- combinational marking tree: builds the mask of `size` cells
// starting at `s_addr` in an N-cell bit array.
//
// The tree is N-1 mark_node slices, labelled 0 (root) to N-2 breadth-first;
// node j drives node 2j+1 (left, lower addresses) and 2j+2 (right), and the
// leaves N-1 .. 2N-2 are mask bits 0 .. N-1. Tree level i (root = level 0)
// holds nodes 2^i-1 .. 2^(i+1)-2 and reads address bit log2(N)-1-i and size
// bit log2(N)-1-i. The root receives the route signal from `en` and its mark
// input from the size msb (size == N marks all cells). A mark spreads to a
// whole subtree; the route follows the address bits down to the frontier and,
// at each level whose size bit is 1, marks one half and moves on, so the run
// is marked exactly, not rounded up to a power of two.
//
// The mask is exact when s_addr is aligned to the next power of two at or
// above size, which holds for every block the buddy locator returns. The
// tree, labelling and signal roles follow the paper; the `en` gating of
// the root mark is this design's (it lets a row enable switch off a marker in
// the two-dimensional marker). N must be a power of two, at least 2.
// Purely combinational, no clock.
module cell_marker #(
  parameter int unsigned N = 8
) (
  input  logic                   en,
  input  logic [$clog2(N)-1:0]   s_addr,
  input  logic [$clog2(N):0]     size,
  output logic [N-1:0]           mask
);

  localparam int unsigned L = $clog2(N);

  // Signals of each tree level are declared in that level's block; position k
  // in level i is node 2^i-1+k, whose children are positions 2k and 2k+1 of
  // level i+1.
  for (genvar i = 0; i < L; i++) begin : g_level
    logic [(1 << i)-1:0] m_in, r_in;
    logic [(2 << i)-1:0] m_out, r_out;

    if (i == 0) begin : g_root
      assign m_in = en & size[L];
      assign r_in = en;
    end else begin : g_inner
      assign m_in = g_level[i-1].m_out;
      assign r_in = g_level[i-1].r_out;
    end

    for (genvar k = 0; k < (1 << i); k++) begin : g_node
      mark_node u_node (
        .in_mark (m_in[k]),
        .in_route(r_in[k]),
        .size    (size[L-1-i]),
        .s_addr  (s_addr[L-1-i]),
        .o_mark  (m_out[2*k+1 -: 2]),
        .o_route (r_out[2*k+1 -: 2])
      );
    end
  end

  assign mask = g_level[L-1].m_out;

endmodule
