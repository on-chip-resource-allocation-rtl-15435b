// tb_alloc_sizes -- runs the complete allocator at the four array sizes of
// the paper's implementation results: 16, 32, 64 and 128 logic blocks,
// arranged as 4 x 4, 8 x 4, 8 x 8 and 16 x 8 meshes. Each size gets its own
// alloc_harness, which issues random array and matrix allocations and frees
// and checks every response and the whole bit map against a reference model.
// Every size must grant at least one request of each scheme and refuse at
// least one for lack of space. A watchdog ends the run after a fixed number
// of cycles.
module tb_alloc_sizes;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  localparam int NS = 4;
  logic done [NS];
  int c [NS], f [NS], ga [NS], gm [NS], rf [NS];

  alloc_harness #(.CX(4),  .CY(4), .NREQ(1500)) h16  (.clk, .rst_n, .done(done[0]), .checks(c[0]),
    .failures(f[0]), .grants_arr(ga[0]), .grants_mesh(gm[0]), .refusals(rf[0]));
  alloc_harness #(.CX(8),  .CY(4), .NREQ(1500)) h32  (.clk, .rst_n, .done(done[1]), .checks(c[1]),
    .failures(f[1]), .grants_arr(ga[1]), .grants_mesh(gm[1]), .refusals(rf[1]));
  alloc_harness #(.CX(8),  .CY(8), .NREQ(1500)) h64  (.clk, .rst_n, .done(done[2]), .checks(c[2]),
    .failures(f[2]), .grants_arr(ga[2]), .grants_mesh(gm[2]), .refusals(rf[2]));
  alloc_harness #(.CX(16), .CY(8), .NREQ(1500)) h128 (.clk, .rst_n, .done(done[3]), .checks(c[3]),
    .failures(f[3]), .grants_arr(ga[3]), .grants_mesh(gm[3]), .refusals(rf[3]));

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3]);
    for (int i = 0; i < NS; i++) begin
      $display("size %0d: %0d checks, %0d failures, %0d array grants, %0d matrix grants, %0d refusals",
               16 << i, c[i], f[i], ga[i], gm[i], rf[i]);
      checks += c[i];
      failures += f[i];
      checks += 3;
      if (ga[i] == 0) begin failures++; $display("no array grant at size %0d", 16 << i); end
      if (gm[i] == 0) begin failures++; $display("no matrix grant at size %0d", 16 << i); end
      if (rf[i] == 0) begin failures++; $display("no refusal at size %0d", 16 << i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
