// Self-checking testbench for ppgc_pg: all 256 operand pairs. Every partial
// product must equal bit i of x times bit j of y, every Q garbage output the
// modulo-2 sum of those bits, and the row-end garbage outputs the y bits.
module tb_ppgc_pg;
  import mult_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  opnd_t x, y;
  pp_t pp;
  logic [19:0] garbage;

  ppgc_pg dut (.*);

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
      for (int j = 0; j < 4; j++) begin
        for (int i = 0; i < 4; i++) begin
          int xi, yj;
          xi = (int'(x) >> i) & 1;
          yj = (int'(y) >> j) & 1;
          checks++;
          if (pp[j][i] !== 1'(xi * yj) || garbage[4*j+i] !== 1'((xi + yj) % 2)) begin
            failures++;
            $display("FAIL x=%h y=%h i=%0d j=%0d pp=%0b", x, y, i, j, pp[j][i]);
          end
        end
        checks++;
        if (garbage[16+j] !== y[j]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
