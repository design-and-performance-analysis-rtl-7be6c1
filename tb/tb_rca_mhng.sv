// Self-checking testbench for rca_mhng at its default width of 4: all 512
// combinations of a, b and cin; {cout, s} must equal a + b + cin. Also counts
// how often the carry out is set, which must happen.
module tb_rca_mhng;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, carries = 0;
  logic [3:0] a, b, s;
  logic cin, cout;
  logic [7:0] garbage;

  rca_mhng dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {a, b, cin} = 9'(v);
      @(posedge clk);
      checks++;
      if (int'({cout, s}) != int'(a) + int'(b) + int'(cin)) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0b s=%0d cout=%0b", a, b, cin, s, cout);
      end
      if (cout) carries++;
    end
    checks++;
    if (carries == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
