// tb_resource_allocator -- end-to-end test of the allocator at its default
// size (4 x 4 logic blocks), against a reference model kept in the testbench.
//
// The model holds its own copy of the bit map and answers each request by
// brute force: an array request of n blocks takes the first aligned free run
// of 2^ceil(log2 n) blocks in row-major order and uses exactly n of them; a
// w x h request takes the first aligned free submesh of the rounded-up shape,
// scanning rows top to bottom and columns left to right, and uses exactly
// w x h blocks. Frees clear the blocks of a live allocation chosen at random.
// Requests are driven on the falling edge and checked after the next rising
// edge, so the one-cycle latency is checked on every request: response flag,
// grant, returned start and the whole bit map.
//
// The run opens with the two-cell example of the paper (blocks 0, 1, 3, 6
// and 7 in use, answer address 4), then issues random requests, back to back
// and with idle cycles between. Each mechanism is counted: array and matrix
// grants, refusals for lack of space, refused malformed requests, frees of
// both kinds, exact-size marking of a non-power-of-two request, whole-array
// allocation, idle cycles and reset in the middle of a run; a mechanism that
// never happened counts as a failure. A watchdog ends the run after a fixed
// number of cycles.
module tb_resource_allocator;
  import alloc_pkg::*;

  localparam int CX = 4, CY = 4, N = CX * CY;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, req_valid;
  alloc_op_e req_op;
  logic [4:0] req_size; logic [3:0] req_addr;
  logic [2:0] req_w, req_h; logic [1:0] req_x, req_y;
  logic resp_valid, resp_ok;
  logic [3:0] resp_addr; logic [1:0] resp_x, resp_y;
  logic [N-1:0] bitmap;

  resource_allocator dut (.*);

  int checks = 0, failures = 0;

  typedef enum int {
    M_ARR_GRANT, M_ARR_FULL, M_MESH_GRANT, M_MESH_FULL, M_BAD_REQ, M_FREE_ARR,
    M_FREE_MESH, M_EXACT, M_WHOLE, M_IDLE, M_BACK2BACK, M_RESET, M_COUNT
  } mech_e;
  int seen [M_COUNT];
  string mech_name [M_COUNT] = '{"array grant", "array refused (no space)", "matrix grant",
    "matrix refused (no space)", "malformed request refused", "array free", "matrix free",
    "exact non-power-of-two marking", "whole-array allocation", "idle cycle",
    "back-to-back request", "reset during run"};

  // Reference model state and live allocations.
  logic [N-1:0] model;
  typedef struct { bit mesh; int a, x, y, n, w, h; } alloc_t;
  alloc_t live [$];

  function automatic int clog2i(input int n);
    int l;
    l = 0;
    while ((1 << l) < n) l++;
    return l;
  endfunction

  function automatic bit region_free(input int x, input int y, input int w, input int h);
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

  task automatic expect_resp(input string tag, input bit ok, input int a, input int x, input int y,
                             input bit chk_a, input bit chk_xy);
    checks++;
    if (!resp_valid || resp_ok !== ok || (ok && chk_a && int'(resp_addr) != a)
        || (ok && chk_xy && (int'(resp_x) != x || int'(resp_y) != y))) begin
      failures++;
      $display("%s: resp_valid %0d ok %0d addr %0d (%0d,%0d); expected ok %0d addr %0d (%0d,%0d)",
               tag, resp_valid, resp_ok, resp_addr, resp_x, resp_y, ok, a, x, y);
    end
    checks++;
    if (bitmap !== model) begin
      failures++;
      $display("%s: bitmap %b, expected %b", tag, bitmap, model);
    end
  endtask

  // Apply one request for a cycle and check the response after the edge.
  task automatic issue(input alloc_op_e op, input int n, input int a, input int w, input int h,
                       input int x, input int y, input bit keep_valid);
    bit ok; int ea, ex, ey;
    req_valid = 1'b1; req_op = op; req_size = 5'(n); req_addr = 4'(a);
    req_w = 3'(w); req_h = 3'(h); req_x = 2'(x); req_y = 2'(y);
    ok = 1'b0; ea = 0; ex = 0; ey = 0;
    case (op)
      OP_ALLOC_ARRAY: begin
        if (n < 1 || n > N) seen[M_BAD_REQ]++;
        else begin
          int bs; bs = 1 << clog2i(n);
          for (int s = 0; s < N && !ok; s += bs)
            if (run_free(s, bs)) begin
              ok = 1'b1; ea = s;
            end
          if (ok) begin
            for (int k = 0; k < n; k++) model[ea + k] = 1'b1;
            live.push_back('{mesh: 0, a: ea, x: 0, y: 0, n: n, w: 0, h: 0});
            seen[M_ARR_GRANT]++;
            if (n != bs) seen[M_EXACT]++;
            if (n == N) seen[M_WHOLE]++;
          end else seen[M_ARR_FULL]++;
        end
      end
      OP_ALLOC_MESH: begin
        if (w < 1 || w > CX || h < 1 || h > CY) seen[M_BAD_REQ]++;
        else begin
          int bw, bh; bw = 1 << clog2i(w); bh = 1 << clog2i(h);
          for (int yy = 0; yy < CY && !ok; yy += bh)
            for (int xx = 0; xx < CX && !ok; xx += bw)
              if (region_free(xx, yy, bw, bh)) begin ok = 1'b1; ex = xx; ey = yy; end
          if (ok) begin
            for (int r = ey; r < ey + h; r++)
              for (int c = ex; c < ex + w; c++) model[r*CX + c] = 1'b1;
            live.push_back('{mesh: 1, a: 0, x: ex, y: ey, n: 0, w: w, h: h});
            seen[M_MESH_GRANT]++;
            if (w != bw || h != bh) seen[M_EXACT]++;
          end else seen[M_MESH_FULL]++;
        end
      end
      OP_FREE_ARRAY: begin
        ok = 1'b1; ea = a;
        for (int k = 0; k < n; k++) model[a + k] = 1'b0;
        seen[M_FREE_ARR]++;
      end
      OP_FREE_MESH: begin
        ok = 1'b1; ex = x; ey = y;
        for (int r = y; r < y + h; r++)
          for (int c = x; c < x + w; c++) model[r*CX + c] = 1'b0;
        seen[M_FREE_MESH]++;
      end
      default: ;
    endcase
    @(posedge clk);
    #1;
    expect_resp($sformatf("%s n=%0d a=%0d w=%0d h=%0d x=%0d y=%0d", op.name(), n, a, w, h, x, y),
                ok, ea, ex, ey, op inside {OP_ALLOC_ARRAY, OP_FREE_ARRAY},
                op inside {OP_ALLOC_MESH, OP_FREE_MESH});
    if (keep_valid) seen[M_BACK2BACK]++;
    @(negedge clk);
    if (!keep_valid) begin
      req_valid = 1'b0;
      req_op = alloc_op_e'($urandom_range(0, 3));
      @(posedge clk);
      #1;
      checks++;
      if (resp_valid || bitmap !== model) begin
        failures++; $display("idle cycle changed state");
      end
      seen[M_IDLE]++;
      @(negedge clk);
    end
  endtask

  task automatic free_random();
    int i;
    alloc_t e;
    i = $urandom_range(0, live.size() - 1);
    e = live[i];
    live.delete(i);
    if (e.mesh) issue(OP_FREE_MESH, 0, 0, e.w, e.h, e.x, e.y, $urandom_range(0, 1) == 1);
    else        issue(OP_FREE_ARRAY, e.n, e.a, 0, 0, 0, 0, $urandom_range(0, 1) == 1);
  endtask

  task automatic do_reset();
    req_valid = 1'b0;
    rst_n = 1'b0;
    #3;
    rst_n = 1'b1;
    model = '0;
    live.delete();
    seen[M_RESET]++;
    @(negedge clk);
    checks++;
    if (bitmap !== '0) begin failures++; $display("reset did not clear the bit map"); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; req_valid = 1'b0; req_op = OP_ALLOC_ARRAY;
    req_size = '0; req_addr = '0; req_w = '0; req_h = '0; req_x = '0; req_y = '0;
    model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // Paper example: cells 0, 1, 3, 6, 7 used; two cells go to address 4.
    issue(OP_ALLOC_ARRAY, 2, 0, 0, 0, 0, 0, 1'b1);   // takes 0-1
    issue(OP_ALLOC_ARRAY, 1, 0, 0, 0, 0, 0, 1'b1);   // takes 2
    issue(OP_ALLOC_ARRAY, 1, 0, 0, 0, 0, 0, 1'b1);   // takes 3
    issue(OP_ALLOC_ARRAY, 2, 0, 0, 0, 0, 0, 1'b1);   // takes 4-5
    issue(OP_ALLOC_ARRAY, 2, 0, 0, 0, 0, 0, 1'b1);   // takes 6-7
    issue(OP_FREE_ARRAY, 1, 2, 0, 0, 0, 0, 1'b1);
    issue(OP_FREE_ARRAY, 2, 4, 0, 0, 0, 0, 1'b1);
    for (int i = live.size() - 1; i >= 0; i--)
      if (!live[i].mesh && live[i].a inside {2, 4}) live.delete(i);
    checks++;
    if (bitmap[7:0] !== 8'b1100_1011) begin
      failures++; $display("example set-up: bitmap %b", bitmap);
    end
    issue(OP_ALLOC_ARRAY, 2, 0, 0, 0, 0, 0, 1'b0);
    checks++;
    if (!resp_ok || resp_addr !== 4'd4) begin
      failures++; $display("example: got address %0d", resp_addr);
    end

    for (int t = 0; t < 3000; t++) begin
      int kind;
      bit b2b;
      b2b = ($urandom_range(0, 3) != 0);
      kind = $urandom_range(0, 99);
      if (t == 1500) do_reset();
      if (kind < 35 || live.size() == 0) begin
        int n;
        n = (kind % 17 == 0) ? $urandom_range(0, 31) : $urandom_range(1, N);
        if (kind % 23 == 0) n = N;
        issue(OP_ALLOC_ARRAY, n, 0, 0, 0, 0, 0, b2b);
      end else if (kind < 70) begin
        int w, h;
        w = (kind % 19 == 0) ? $urandom_range(0, 7) : $urandom_range(1, CX);
        h = (kind % 19 == 0) ? $urandom_range(0, 7) : $urandom_range(1, CY);
        issue(OP_ALLOC_MESH, 0, 0, w, h, 0, 0, b2b);
      end else begin
        free_random();
      end
    end

    for (int m = 0; m < M_COUNT; m++) begin
      $display("%-32s %0d", mech_name[m], seen[m]);
      checks++;
      if (seen[m] == 0) begin
        failures++; $display("mechanism never exercised: %s", mech_name[m]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
