// Self-checking testbench for bvf_gate: all sixteen input combinations;
// P and R must copy A and C, Q and S must be the modulo-2 sums A+B and C+D.
module tb_bvf_gate;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic a, b, c, d, p, q, r, s;

  bvf_gate dut (.*);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      @(posedge clk);
      checks++;
      if (p !== a || r !== c || q !== 1'((int'(a) + int'(b)) % 2) ||
          s !== 1'((int'(c) + int'(d)) % 2)) begin
        failures++;
        $display("FAIL in=%04b out=%0b%0b%0b%0b", v[3:0], p, q, r, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
