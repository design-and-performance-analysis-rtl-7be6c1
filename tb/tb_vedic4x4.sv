// Self-checking testbench for vedic4x4: all 256 pairs of 4-bit unsigned operands;
// the product must equal the integer product x * y.
module tb_vedic4x4;
  import mult_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  opnd_t x, y;
  prod_t p;
  logic [65:0] garbage;

  vedic4x4 dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      {x, y} = 8'(v);
      @(posedge clk);
      checks++;
      if (int'(p) != int'(x) * int'(y)) begin
        failures++;
        $display("FAIL x=%0d y=%0d p=%0d", x, y, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
