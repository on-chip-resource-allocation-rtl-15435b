// resource_allocator -- on-chip allocator of the logic blocks of a
// reconfigurable device, built on a hardware binary buddy system.
//
// The device's CELLS_X x CELLS_Y logic blocks are tracked by an occupancy bit
// map (1 = used, 0 = free), stored row-major: block (column x, row y) is bit
// y*CELLS_X + x. The same bit map serves two allocation schemes:
//   array  -- a run of req_size consecutive blocks in row-major order. The
//             cell_locator finds the first free aligned block of
//             2^ceil(log2 req_size) cells and the cell_marker marks exactly
//             req_size cells from its start.
//   matrix -- a req_w x req_h rectangle. The mesh_locator finds the first free
//             aligned submesh whose sides are req_w and req_h rounded up to
//             powers of two, and the mesh_marker marks exactly req_w x req_h.
// Freeing uses the same markers at the start the caller gives (req_addr, or
// req_x/req_y) and clears the marked bits.
//
// Timing: search and marking are one combinational pass. A request presented
// with req_valid is taken at a rising clock edge; on that edge the bit map is
// updated and the response registers load, so resp_valid, resp_ok and the
// returned start are valid the cycle after the request. One request per
// cycle, back to back. rst_n (asynchronous, active low) marks every block
// free.
//
// The locators, markers, the bit map and the two schemes follow the paper.
// The bit-map register, the request/response interface, the shared row-major
// bit map, and refusing a zero or oversized request are this design's. A free
// is always accepted and is not checked against what was allocated.
module resource_allocator #(
  parameter int unsigned CELLS_X = 4,
  parameter int unsigned CELLS_Y = 4
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                req_valid,
  input  alloc_pkg::alloc_op_e                req_op,
  input  logic [$clog2(CELLS_X*CELLS_Y):0]    req_size,
  input  logic [$clog2(CELLS_X*CELLS_Y)-1:0]  req_addr,
  input  logic [$clog2(CELLS_X):0]            req_w,
  input  logic [$clog2(CELLS_Y):0]            req_h,
  input  logic [$clog2(CELLS_X)-1:0]          req_x,
  input  logic [$clog2(CELLS_Y)-1:0]          req_y,
  output logic                                resp_valid,
  output logic                                resp_ok,
  output logic [$clog2(CELLS_X*CELLS_Y)-1:0]  resp_addr,
  output logic [$clog2(CELLS_X)-1:0]          resp_x,
  output logic [$clog2(CELLS_Y)-1:0]          resp_y,
  output logic [CELLS_X*CELLS_Y-1:0]          bitmap
);

  import alloc_pkg::*;

  localparam int unsigned N  = CELLS_X * CELLS_Y;
  localparam int unsigned LN = $clog2(N);
  localparam int unsigned LX = $clog2(CELLS_X);
  localparam int unsigned LY = $clog2(CELLS_Y);

  // ---- request decode ---------------------------------------------------
  logic size_ok, shape_ok;
  logic [$clog2(LN+1)-1:0] arr_level;
  logic [$clog2(LX+1)-1:0] mesh_lw;
  logic [$clog2(LY+1)-1:0] mesh_lh;

  always_comb begin
    size_ok   = (req_size != '0) && (32'(req_size) <= N);
    shape_ok  = (req_w != '0) && (32'(req_w) <= CELLS_X)
             && (req_h != '0) && (32'(req_h) <= CELLS_Y);
    arr_level = $bits(arr_level)'(ceil_log2(32'(req_size)));
    mesh_lw   = $bits(mesh_lw)'(ceil_log2(32'(req_w)));
    mesh_lh   = $bits(mesh_lh)'(ceil_log2(32'(req_h)));
  end

  // ---- array scheme -----------------------------------------------------
  logic          arr_found;
  logic [LN-1:0] arr_start;
  logic [LN-1:0] arr_mark_addr;
  logic          arr_mark_en;
  logic [N-1:0]  arr_mask;

  cell_locator #(.N(N)) u_locator (
    .cells(bitmap),
    .level(arr_level),
    .valid(arr_found),
    .addr (arr_start)
  );

  assign arr_mark_addr = (req_op == OP_ALLOC_ARRAY) ? arr_start : req_addr;
  assign arr_mark_en   = size_ok && ((req_op == OP_FREE_ARRAY) || arr_found);

  cell_marker #(.N(N)) u_marker (
    .en    (arr_mark_en),
    .s_addr(arr_mark_addr),
    .size  (req_size),
    .mask  (arr_mask)
  );

  // ---- matrix scheme ----------------------------------------------------
  logic          mesh_found;
  logic [LX-1:0] mesh_x, mark_x;
  logic [LY-1:0] mesh_y, mark_y;
  logic          mesh_mark_en;
  logic [N-1:0]  mesh_mask;

  mesh_locator #(.CELLS_X(CELLS_X), .CELLS_Y(CELLS_Y)) u_mesh_locator (
    .cells(bitmap),
    .lw   (mesh_lw),
    .lh   (mesh_lh),
    .valid(mesh_found),
    .x    (mesh_x),
    .y    (mesh_y)
  );

  assign mark_x       = (req_op == OP_ALLOC_MESH) ? mesh_x : req_x;
  assign mark_y       = (req_op == OP_ALLOC_MESH) ? mesh_y : req_y;
  assign mesh_mark_en = shape_ok && ((req_op == OP_FREE_MESH) || mesh_found);

  mesh_marker #(.CELLS_X(CELLS_X), .CELLS_Y(CELLS_Y)) u_mesh_marker (
    .en  (mesh_mark_en),
    .x   (mark_x),
    .y   (mark_y),
    .w   (req_w),
    .h   (req_h),
    .mask(mesh_mask)
  );

  // ---- bit map update and response --------------------------------------
  logic         grant;
  logic [N-1:0] bitmap_next;

  always_comb begin
    grant       = 1'b0;
    bitmap_next = bitmap;
    unique case (req_op)
      OP_ALLOC_ARRAY: begin
        grant       = arr_mark_en;
        bitmap_next = bitmap | arr_mask;
      end
      OP_FREE_ARRAY: begin
        grant       = arr_mark_en;
        bitmap_next = bitmap & ~arr_mask;
      end
      OP_ALLOC_MESH: begin
        grant       = mesh_mark_en;
        bitmap_next = bitmap | mesh_mask;
      end
      OP_FREE_MESH: begin
        grant       = mesh_mark_en;
        bitmap_next = bitmap & ~mesh_mask;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bitmap     <= '0;
      resp_valid <= 1'b0;
      resp_ok    <= 1'b0;
      resp_addr  <= '0;
      resp_x     <= '0;
      resp_y     <= '0;
    end else begin
      resp_valid <= req_valid;
      if (req_valid) begin
        bitmap    <= bitmap_next;
        resp_ok   <= grant;
        resp_addr <= arr_mark_addr;
        resp_x    <= mark_x;
        resp_y    <= mark_y;
      end
    end
  end

  // An allocation may only take blocks that are free, and marks exactly the
  // number of blocks asked for.
  a_alloc_array_free : assert property (@(posedge clk) disable iff (!rst_n)
    (req_valid && req_op == OP_ALLOC_ARRAY && grant)
      |-> ((arr_mask & bitmap) == '0) && ($countones(arr_mask) == 32'(req_size)));
  a_alloc_mesh_free : assert property (@(posedge clk) disable iff (!rst_n)
    (req_valid && req_op == OP_ALLOC_MESH && grant)
      |-> ((mesh_mask & bitmap) == '0)
          && ($countones(mesh_mask) == 32'(req_w) * 32'(req_h)));

endmodule
