// Self-checking testbench for vedic2x2: all sixteen pairs of 2-bit operands;
// q must equal the integer product a * b.
module tb_vedic2x2;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [1:0] a, b;
  logic [3:0] q;
  logic [9:0] garbage;

  vedic2x2 dut (.*);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a, b} = 4'(v);
      @(posedge clk);
      checks++;
      if (int'(q) != int'(a) * int'(b)) begin
        failures++;
        $display("FAIL a=%0d b=%0d q=%0d", a, b, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
