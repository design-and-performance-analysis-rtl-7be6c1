// Self-checking testbench for ppgc_tg: all 256 operand pairs. Every partial
// product must equal bit i of x times bit j of y; the row-end garbage outputs
// must be the y bits and the last-row Q outputs x[i] + y[3] modulo 2.
module tb_ppgc_tg;
  import mult_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  opnd_t x, y;
  pp_t pp;
  logic [7:0] garbage;

  ppgc_tg dut (.*);

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
          checks++;
          if (pp[j][i] !== 1'(((int'(x) >> i) & 1) * ((int'(y) >> j) & 1))) begin
            failures++;
            $display("FAIL x=%h y=%h i=%0d j=%0d pp=%0b", x, y, i, j, pp[j][i]);
          end
        end
        checks++;
        if (garbage[j] !== y[j]) failures++;
        checks++;
        if (garbage[4+j] !== 1'((((int'(x) >> j) & 1) + int'(y[3])) % 2)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
