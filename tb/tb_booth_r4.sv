// Self-checking testbench for booth_r4. The default 4-bit instance and a
// 5-bit instance (odd width, so the multiplier is sign-extended by one bit)
// are checked on all operand pairs, an 8-bit instance on 5000 random pairs:
// p must equal the signed product of a and b. The testbench also counts, from
// the operands it applies, how often each recoding (0, +Y, +2Y, -Y, -2Y) was
// exercised; one that never occurs counts as a failure.
module tb_booth_r4;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int seen [5];

  logic [3:0] a4, b4;  logic [7:0]  p4;
  logic [4:0] a5, b5;  logic [9:0]  p5;
  logic [7:0] a8, b8;  logic [15:0] p8;

  booth_r4              dut4 (.a(a4), .b(b4), .p(p4));
  booth_r4 #(.N(5))     dut5 (.a(a5), .b(b5), .p(p5));
  booth_r4 #(.N(8))     dut8 (.a(a8), .b(b8), .p(p8));

  // Recoding of one triplet, as a signed multiple of Y.
  function automatic int digit(input logic [2:0] t);
    return -2 * int'(t[2]) + int'(t[1]) + int'(t[0]);
  endfunction

  task automatic note_digits(input logic [3:0] b);
    logic [4:0] bz;
    bz = {b, 1'b0};
    for (int k = 0; k < 2; k++) begin
      int d;
      d = digit(bz[2*k +: 3]);
      seen[d + 2]++;
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[i]) seen[i] = 0;
    a5 = '0; b5 = '0; a8 = '0; b8 = '0;
    for (int v = 0; v < 256; v++) begin
      {a4, b4} = 8'(v);
      note_digits(b4);
      @(posedge clk);
      checks++;
      if ($signed(p4) != $signed(a4) * $signed(b4)) begin
        failures++;
        $display("FAIL N=4 a=%0d b=%0d p=%0d", $signed(a4), $signed(b4), $signed(p4));
      end
    end
    for (int v = 0; v < 1024; v++) begin
      {a5, b5} = 10'(v);
      @(posedge clk);
      checks++;
      if ($signed(p5) != $signed(a5) * $signed(b5)) begin
        failures++;
        $display("FAIL N=5 a=%0d b=%0d p=%0d", $signed(a5), $signed(b5), $signed(p5));
      end
    end
    for (int n = 0; n < 5000; n++) begin
      a8 = 8'($urandom); b8 = 8'($urandom);
      if (n == 0) begin a8 = 8'h80; b8 = 8'h80; end
      @(posedge clk);
      checks++;
      if ($signed(p8) != $signed(a8) * $signed(b8)) begin
        failures++;
        $display("FAIL N=8 a=%0d b=%0d p=%0d", $signed(a8), $signed(b8), $signed(p8));
      end
    end
    for (int i = 0; i < 5; i++) begin
      $display("recoding %0d*Y applied %0d times", i - 2, seen[i]);
      checks++;
      if (seen[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
