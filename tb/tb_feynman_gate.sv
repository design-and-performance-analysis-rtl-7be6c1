// Self-checking testbench for feynman_gate: applies all four input
// combinations and compares P and Q with a copy of A and the arithmetic sum
// of A and B modulo 2.
module tb_feynman_gate;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic a, b, p, q;

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

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
      if (p !== a || q !== 1'((int'(a) + int'(b)) % 2)) begin
        failures++;
        $display("FAIL a=%0b b=%0b p=%0b q=%0b", a, b, p, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
