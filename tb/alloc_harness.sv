// alloc_harness -- drives one resource_allocator of CX x CY blocks with a
// random stream of requests and checks every response against a reference
// model kept here (brute-force first fit over aligned blocks, exact-size
// marking, frees of live allocations). Used by tb_alloc_sizes to run the
// allocator at several array sizes side by side.
//
// Interface: clk and rst_n come from the parent; after NREQ requests `done`
// rises and `checks` / `failures` hold the totals. grants_arr and grants_mesh
// count granted array and matrix allocations so the parent can see that both
// schemes were used; refusals counts allocations refused for lack of space.
// Requests are driven on the falling edge and the response is checked one
// rising edge later (one-cycle latency).
module alloc_harness #(
  parameter int CX   = 4,
  parameter int CY   = 4,
  parameter int NREQ = 1000
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   grants_arr,
  output int   grants_mesh,
  output int   refusals
);
  import alloc_pkg::*;

  localparam int N = CX * CY;

  logic req_valid;
  alloc_op_e req_op;
  logic [$clog2(N):0] req_size; logic [$clog2(N)-1:0] req_addr;
  logic [$clog2(CX):0] req_w; logic [$clog2(CY):0] req_h;
  logic [$clog2(CX)-1:0] req_x; logic [$clog2(CY)-1:0] req_y;
  logic resp_valid, resp_ok;
  logic [$clog2(N)-1:0] resp_addr; logic [$clog2(CX)-1:0] resp_x; logic [$clog2(CY)-1:0] resp_y;
  logic [N-1:0] bitmap;

  resource_allocator #(.CELLS_X(CX), .CELLS_Y(CY)) dut (.*);

  logic [N-1:0] model;
  typedef struct { bit mesh; int a, x, y, n, w, h; } alloc_t;
  alloc_t live [$];

  function automatic int clog2i(input int n);
    int l;
    l = 0;
    while ((1 << l) < n) l++;
    return l;
  endfunction

  function automatic bit rect_free(input int x, input int y, input int w, input int h);
    for (int r = y; r < y + h; r++)
      for (int c = x; c < x + w; c++)
        if (model[r*CX + c]) return 1'b0;
    return 1'b1;
  endfunction

  function automatic bit run_free(input int s, input int n);
    for (int k = s; k < s + n; k++)
      if (model[k]) return 1'b0;
    return 1'b1;
  endfunction

  task automatic issue(input alloc_op_e op, input int n, input int a, input int w, input int h,
                       input int x, input int y);
    bit ok; int ea, ex, ey;
    req_valid = 1'b1; req_op = op; req_size = ($clog2(N)+1)'(n); req_addr = $clog2(N)'(a);
    req_w = ($clog2(CX)+1)'(w); req_h = ($clog2(CY)+1)'(h);
    req_x = $clog2(CX)'(x); req_y = $clog2(CY)'(y);
    ok = 1'b0; ea = a; ex = x; ey = y;
    case (op)
      OP_ALLOC_ARRAY: begin
        int bs; bs = 1 << clog2i(n);
        for (int s = 0; s < N && !ok; s += bs)
          if (run_free(s, bs)) begin ok = 1'b1; ea = s; end
        if (ok) begin
          for (int k = 0; k < n; k++) model[ea + k] = 1'b1;
          live.push_back('{mesh: 0, a: ea, x: 0, y: 0, n: n, w: 0, h: 0});
          grants_arr++;
        end else refusals++;
      end
      OP_ALLOC_MESH: begin
        int bw, bh; bw = 1 << clog2i(w); bh = 1 << clog2i(h);
        for (int yy = 0; yy < CY && !ok; yy += bh)
          for (int xx = 0; xx < CX && !ok; xx += bw)
            if (rect_free(xx, yy, bw, bh)) begin ok = 1'b1; ex = xx; ey = yy; end
        if (ok) begin
          for (int r = ey; r < ey + h; r++)
            for (int c = ex; c < ex + w; c++) model[r*CX + c] = 1'b1;
          live.push_back('{mesh: 1, a: 0, x: ex, y: ey, n: 0, w: w, h: h});
          grants_mesh++;
        end else refusals++;
      end
      OP_FREE_ARRAY: begin
        ok = 1'b1;
        for (int k = 0; k < n; k++) model[a + k] = 1'b0;
      end
      default: begin
        ok = 1'b1;
        for (int r = y; r < y + h; r++)
          for (int c = x; c < x + w; c++) model[r*CX + c] = 1'b0;
      end
    endcase
    @(posedge clk);
    #1;
    checks++;
    if (!resp_valid || resp_ok !== ok
        || (ok && op inside {OP_ALLOC_ARRAY, OP_FREE_ARRAY} && int'(resp_addr) != ea)
        || (ok && op inside {OP_ALLOC_MESH, OP_FREE_MESH}
            && (int'(resp_x) != ex || int'(resp_y) != ey))) begin
      failures++;
      $display("%0dx%0d %s: ok %0d addr %0d (%0d,%0d), expected ok %0d addr %0d (%0d,%0d)",
               CX, CY, op.name(), resp_ok, resp_addr, resp_x, resp_y, ok, ea, ex, ey);
    end
    checks++;
    if (bitmap !== model) begin
      failures++;
      $display("%0dx%0d %s: bitmap %h, expected %h", CX, CY, op.name(), bitmap, model);
    end
    @(negedge clk);
  endtask

  initial begin
    done = 1'b0; checks = 0; failures = 0; grants_arr = 0; grants_mesh = 0; refusals = 0;
    req_valid = 1'b0; req_op = OP_ALLOC_ARRAY; req_size = '0; req_addr = '0;
    req_w = '0; req_h = '0; req_x = '0; req_y = '0;
    model = '0;
    @(posedge rst_n);
    @(negedge clk);
    for (int t = 0; t < NREQ; t++) begin
      int kind;
      kind = $urandom_range(0, 99);
      if (kind < 35 || live.size() == 0) begin
        issue(OP_ALLOC_ARRAY, $urandom_range(1, N / 2), 0, 0, 0, 0, 0);
      end else if (kind < 70) begin
        issue(OP_ALLOC_MESH, 0, 0, $urandom_range(1, CX), $urandom_range(1, CY), 0, 0);
      end else begin
        int i; alloc_t e;
        i = $urandom_range(0, live.size() - 1);
        e = live[i];
        live.delete(i);
        if (e.mesh) issue(OP_FREE_MESH, 0, 0, e.w, e.h, e.x, e.y);
        else        issue(OP_FREE_ARRAY, e.n, e.a, 0, 0, 0, 0);
      end
    end
    req_valid = 1'b0;
    done = 1'b1;
  end
endmodule
