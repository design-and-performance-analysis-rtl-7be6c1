// Self-checking testbench for ha_pg: all four input pairs; {co, s} must equal
// the integer sum a + b and the garbage output must be a copy of a.
module tb_ha_pg;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic a, b, s, co, g;

  ha_pg dut (.*);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      @(posedge clk);
      checks++;
      if ({co, s} !== 2'(int'(a) + int'(b)) || g !== a) begin
        failures++;
        $display("FAIL a=%0b b=%0b s=%0b co=%0b g=%0b", a, b, s, co, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
