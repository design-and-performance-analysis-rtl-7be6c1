// Self-checking testbench for fa_mhng: all eight input combinations; {co, s}
// must equal the integer sum a + b + ci, the garbage outputs must be {a, 0}.
module tb_fa_mhng;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic a, b, ci, s, co;
  logic [1:0] g;

  fa_mhng dut (.*);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, ci} = 3'(v);
      @(posedge clk);
      checks++;
      if ({co, s} !== 2'(int'(a) + int'(b) + int'(ci)) || g !== {a, 1'b0}) begin
        failures++;
        $display("FAIL in=%03b s=%0b co=%0b g=%02b", v[2:0], s, co, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
