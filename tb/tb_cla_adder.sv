// Self-checking testbench for cla_adder at its default width of 8: corner
// cases (carry rippling through all bits) and 20000 random operand pairs;
// {cout, s} must equal a + b + cin.
module tb_cla_adder;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [7:0] a, b, s;
  logic cin, cout;

  cla_adder dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [7:0] ta, input logic [7:0] tb, input logic tc);
    a = ta; b = tb; cin = tc;
    @(posedge clk);
    checks++;
    if (int'({cout, s}) != int'(ta) + int'(tb) + int'(tc)) begin
      failures++;
      $display("FAIL a=%0d b=%0d cin=%0b s=%0d cout=%0b", ta, tb, tc, s, cout);
    end
  endtask

  initial begin
    check_one(8'hFF, 8'h00, 1'b1);
    check_one(8'hFF, 8'h01, 1'b0);
    check_one(8'hFF, 8'hFF, 1'b1);
    check_one(8'h00, 8'h00, 1'b0);
    check_one(8'h80, 8'h80, 1'b0);
    for (int n = 0; n < 20000; n++)
      check_one(8'($urandom), 8'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
