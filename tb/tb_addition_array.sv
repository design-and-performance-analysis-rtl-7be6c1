// Self-checking testbench for addition_array. It applies all 65536 patterns
// of the sixteen summand inputs, not only those that come from two operands:
// the product must equal the weighted sum of pp[j][i] * 2^(i+j), which is at
// most 225 and so always fits in 8 bits.
module tb_addition_array;
  import mult_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  pp_t pp;
  prod_t p;
  logic [19:0] garbage;

  addition_array dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      int expv;
      pp = 16'(v);
      expv = 0;
      for (int j = 0; j < 4; j++)
        for (int i = 0; i < 4; i++)
          if (pp[j][i]) expv += 1 << (i + j);
      @(posedge clk);
      checks++;
      if (int'(p) != expv) begin
        failures++;
        if (failures < 10) $display("FAIL pp=%h p=%0d expected %0d", pp, p, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
