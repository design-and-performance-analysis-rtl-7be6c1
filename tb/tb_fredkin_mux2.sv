// Self-checking testbench for fredkin_mux2: all eight input combinations.
// o must be i1 when s = 1 and i0 otherwise; the garbage outputs must be s
// and the input that was not selected. Also checks that the gate is a
// conservative swap: the number of ones is the same at input and output.
module tb_fredkin_mux2;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic s, i0, i1, o;
  logic [1:0] g;

  fredkin_mux2 dut (.*);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic exp_o, other;
      {s, i0, i1} = 3'(v);
      exp_o = (s == 1'b1) ? i1 : i0;
      other = (s == 1'b1) ? i0 : i1;
      @(posedge clk);
      checks++;
      if (o !== exp_o || g !== {s, other} ||
          (int'(o) + int'(g[0]) + int'(g[1])) != (int'(s) + int'(i0) + int'(i1))) begin
        failures++;
        $display("FAIL s=%0b i0=%0b i1=%0b o=%0b g=%02b", s, i0, i1, o, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
