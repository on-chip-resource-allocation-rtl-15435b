// mark_node -- one node of the marking tree ("bitalloc").
//
// The marking tree turns a starting address and a cell count into a mask of
// the cells to set (allocate) or clear (free). Two signals travel from the
// root to the leaves:
//   mark  -- the whole subtree is to be marked; a marked node marks both
//            children.
//   route -- the subtree holds the frontier of the run still being marked.
// A routed node looks at the size bit of its level (one child's worth of
// cells) and at its address bit:
//   size 0           -> route to the child selected by the address bit;
//   size 1           -> mark the child selected by the address bit and route
//                       the other one.
// Two-bit outputs: bit 1 goes to the right child (higher addresses), bit 0 to
// the left child, as in the paper. These rules are the paper's; letting
// an incoming mark override the route is this design's choice.
// Purely combinational, no clock.
module mark_node (
  input  logic       in_mark,
  input  logic       in_route,
  input  logic       size,     // marking-size bit of this level
  input  logic       s_addr,   // starting-address bit of this level
  output logic [1:0] o_mark,   // [1] right child, [0] left child
  output logic [1:0] o_route
);

  always_comb begin
    o_mark  = 2'b00;
    o_route = 2'b00;
    if (in_mark) begin
      o_mark = 2'b11;
    end else if (in_route) begin
      if (size) begin
        o_mark  = s_addr ? 2'b10 : 2'b01;
        o_route = s_addr ? 2'b01 : 2'b10;
      end else begin
        o_route = s_addr ? 2'b10 : 2'b01;
      end
    end
  end

endmodule
