// Self-checking testbench for peres_gate: all eight input combinations.
// Expected: P = A, Q = (A + B) mod 2, R = (A*B + C) mod 2.
module tb_peres_gate;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic a, b, c, p, q, r;

  peres_gate dut (.*);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      @(posedge clk);
      checks++;
      if (p !== a || q !== 1'((int'(a) + int'(b)) % 2) ||
          r !== 1'((int'(a) * int'(b) + int'(c)) % 2)) begin
        failures++;
        $display("FAIL in=%03b out=%0b%0b%0b", v[2:0], p, q, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
