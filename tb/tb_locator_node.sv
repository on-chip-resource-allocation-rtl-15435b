// tb_locator_node -- exhaustive check of one OR/AND locator slice.
//
// Drives all 32 combinations of the five inputs and compares the three outputs
// with the slice's truth table written out here: out_or is the OR of the two
// OR inputs, out_and is that OR at the requested level and the AND of the two
// AND inputs elsewhere, p_bit is the left AND input. A watchdog ends the run
// after a fixed number of clock cycles.
module tb_locator_node;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic or_a, or_b, and_a, and_b, level;
  logic out_or, out_and, p_bit;
  int checks = 0, failures = 0;

  locator_node dut (.or_a, .or_b, .and_a, .and_b, .level, .out_or, .out_and, .p_bit);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {level, and_b, and_a, or_b, or_a} = 5'(v);
      @(posedge clk);
      checks++;
      if (out_or !== (v[0] || v[1])) begin
        failures++; $display("out_or wrong for %b", 5'(v));
      end
      checks++;
      if (out_and !== (v[4] ? (v[0] || v[1]) : (v[2] && v[3]))) begin
        failures++; $display("out_and wrong for %b", 5'(v));
      end
      checks++;
      if (p_bit !== v[2]) begin
        failures++; $display("p_bit wrong for %b", 5'(v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
