// tb_mark_node -- exhaustive check of one marking-tree node.
//
// All 16 input combinations are driven. Expected outputs are written as a
// table of cases: a marked node marks both children; a routed node with size
// bit 0 routes to the child its address bit names; with size bit 1 it marks
// that child and routes the other; an idle node drives nothing. Bit 1 of each
// output pair is the right child. A watchdog ends the run after a fixed number
// of clock cycles.
module tb_mark_node;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic in_mark, in_route, size, s_addr;
  logic [1:0] o_mark, o_route;
  int checks = 0, failures = 0;

  mark_node dut (.in_mark, .in_route, .size, .s_addr, .o_mark, .o_route);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] em, er;
    for (int v = 0; v < 16; v++) begin
      {in_mark, in_route, size, s_addr} = 4'(v);
      @(posedge clk);
      casez (4'(v))
        4'b1???: begin em = 2'b11; er = 2'b00; end
        4'b0100: begin em = 2'b00; er = 2'b01; end
        4'b0101: begin em = 2'b00; er = 2'b10; end
        4'b0110: begin em = 2'b01; er = 2'b10; end
        4'b0111: begin em = 2'b10; er = 2'b01; end
        default: begin em = 2'b00; er = 2'b00; end
      endcase
      checks++;
      if (o_mark !== em || o_route !== er) begin
        failures++;
        $display("inputs %b: mark %b route %b, expected %b %b", 4'(v), o_mark, o_route, em, er);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
