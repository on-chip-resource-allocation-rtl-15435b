// locator_node -- one node ("one bit free cell locator") of the combined
// OR/AND tree that finds free cells in the occupancy bit array.
//
// Every node ORs the OR outputs of its two children: out_or is 0 only when the
// whole subtree is free. The AND chain answers "is there a free block of the
// requested size somewhere below?": at the node whose height equals the
// requested block level (level = 1) the node feeds its own OR into the AND
// chain; above that level it ANDs the AND outputs of its children, so a 0
// travels up from any free block. p_bit is the left child's AND output. It is
// the address bit of this node: 0 means a free block lies in the left subtree,
// 1 means the search continues in the right one, so no backtracking is needed.
//
// The behaviour (including the p_bit taken from the left child) follows the
// paper's one-bit locator slice; the port names are this design's.
// Purely combinational, no clock.
module locator_node (
  input  logic or_a,    // OR output of the left child (cell bit at a leaf)
  input  logic or_b,    // OR output of the right child
  input  logic and_a,   // AND output of the left child
  input  logic and_b,   // AND output of the right child
  input  logic level,   // 1 when this node's height is the requested level
  output logic out_or,
  output logic out_and,
  output logic p_bit
);

  always_comb begin
    out_or  = or_a | or_b;
    out_and = level ? (or_a | or_b) : (and_a & and_b);
    p_bit   = and_a;
  end

endmodule
