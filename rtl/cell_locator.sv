// cell_locator -- combinational buddy-system free-cell locator.
//
// Input is the occupancy bit array of N cells (1 = used, 0 = free; bit i is
// cell address i) and a requested block level: the caller wants an aligned
// block of 2^level free cells. The locator answers in one combinational pass:
//   valid -- such a block exists;
//   addr  -- address of the first cell of the lowest-addressed one.
//
// Structure: a complete binary tree of N-1 locator_node slices, labelled 0
// (root) to N-2 in breadth-first order, with cell i as leaf N-1+i; node j has
// children 2j+1 and 2j+2. The OR chain of the tree gives, for every aligned
// block, whether it is wholly free. The node whose height equals `level`
// injects that OR into the AND chain, and the nodes above AND their
// children's values, so the root AND output is the AND of all OR outputs at
// the requested level: 0 exactly when a free block exists. Each node's
// propagated bit (its left child's AND output) is one address bit; a
// multiplexer per tree level picks the bit of the node that the upper address
// bits point at, so the address is formed without backtracking. Address bits
// below the requested level are forced to zero, which gives the absolute
// start of the block rather than a block index.
//
// The tree, its node function and the per-level address multiplexers follow
// the paper's locator; the binary `level` input (decoded inside) and the
// zero-forcing of low address bits are this design's. A level above log2(N)
// returns valid = 0. N must be a power of two, at least 2.
module cell_locator #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]                  cells,
  input  logic [$clog2($clog2(N)+1)-1:0] level,
  output logic                          valid,
  output logic [$clog2(N)-1:0]          addr
);

  localparam int unsigned L = $clog2(N);

  // Per-node signals; indices N-1 .. 2N-2 are the leaves (the cells).
  logic or_w  [2*N-1];
  logic and_w [2*N-1];
  logic p_w   [N-1];

  for (genvar i = 0; i < N; i++) begin : g_leaf
    assign or_w[N-1+i]  = cells[i];
    assign and_w[N-1+i] = cells[i];
  end

  for (genvar d = 0; d < L; d++) begin : g_depth
    for (genvar j = (1 << d) - 1; j < (2 << d) - 1; j++) begin : g_node
      locator_node u_node (
        .or_a   (or_w[2*j+1]),
        .or_b   (or_w[2*j+2]),
        .and_a  (and_w[2*j+1]),
        .and_b  (and_w[2*j+2]),
        .level  (32'(level) == L - d),
        .out_or (or_w[j]),
        .out_and(and_w[j]),
        .p_bit  (p_w[j])
      );
    end
  end

  // A level code above log2(N) is only possible when N is not 2^(2^k - 1).
  logic level_ok;
  if ((1 << $bits(level)) - 1 > L) begin : g_lvl_chk
    assign level_ok = 32'(level) <= L;
  end else begin : g_lvl_all
    assign level_ok = 1'b1;
  end

  // Address multiplexers: at depth d the bit comes from node (2^d - 1) plus
  // the d address bits already chosen above it.
  always_comb begin
    int unsigned node;
    addr = '0;
    node = 0;
    for (int d = 0; d < int'(L); d++) begin
      if (L - d > 32'(level)) begin
        addr[L-1-d] = p_w[node];
      end
      node = 2 * node + 1 + int'(addr[L-1-d]);
    end
    valid = level_ok && !and_w[0];
  end

endmodule
