// Self-checking testbench for mhng_gate: all sixteen input combinations.
// Expected: P = A, Q = D, R = (A+B+C) mod 2, and S = carry of A+B+C
// (that is (A+B+C) >= 2) inverted when D = 1.
module tb_mhng_gate;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic a, b, c, d, p, q, r, s;

  mhng_gate dut (.*);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int sum;
      logic exp_s;
      {a, b, c, d} = 4'(v);
      sum   = int'(a) + int'(b) + int'(c);
      exp_s = (sum >= 2) != d;
      @(posedge clk);
      checks++;
      if (p !== a || q !== d || r !== 1'(sum % 2) || s !== exp_s) begin
        failures++;
        $display("FAIL in=%04b out=%0b%0b%0b%0b", v[3:0], p, q, r, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
