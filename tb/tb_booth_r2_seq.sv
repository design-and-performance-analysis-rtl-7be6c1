// Self-checking testbench for booth_r2_seq. The default 4-bit instance is run
// on all 256 operand pairs, a 6-bit instance on 300 random pairs. For each
// product it checks the signed result, the latency (done exactly N + 1 clocks
// after the start cycle), and which operand was chosen as multiplier, using
// its own count of bit changes. It counts the add, subtract and shift-only
// steps and the swapped and unswapped operand choices; any of these that never
// happens counts as a failure. The worked example 2 x (-4) is checked first.
module tb_booth_r2_seq;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0, n_shift = 0, n_swap = 0, n_noswap = 0;
  logic rst_n;

  logic       start4, busy4, done4, sw4;
  logic [3:0] a4, b4;
  logic [7:0] p4;
  logic       start6, busy6, done6, sw6;
  logic [5:0] a6, b6;
  logic [11:0] p6;

  booth_r2_seq          dut4 (.clk(clk), .rst_n(rst_n), .start(start4), .a(a4), .b(b4),
                              .busy(busy4), .done(done4), .p(p4), .swapped(sw4));
  booth_r2_seq #(.N(6)) dut6 (.clk(clk), .rst_n(rst_n), .start(start6), .a(a6), .b(b6),
                              .busy(busy6), .done(done6), .p(p6), .swapped(sw6));

  function automatic int changes(input logic [7:0] v, input int n);
    int c = 0;
    for (int i = 1; i < n; i++) if (v[i] != v[i-1]) c++;
    return c;
  endfunction

  // Count the step kinds of the 4-bit instance from its multiplier bits.
  always @(posedge clk) begin
    if (busy4) begin
      unique case ({dut4.x[0], dut4.xm1})
        2'b01:   n_add++;
        2'b10:   n_sub++;
        default: n_shift++;
      endcase
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; start4 = 1'b0; start6 = 1'b0;
    a4 = '0; b4 = '0; a6 = '0; b6 = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // Worked example: 2 x (-4). 0010 has two bit changes, 1100 one, so
    // 1100 must be taken as the multiplier (no swap) and the product is -8.
    a4 <= 4'b0010; b4 <= 4'b1100; start4 <= 1'b1;
    @(posedge clk);
    start4 <= 1'b0;
    wait (done4 == 1'b1);
    #1;
    checks++;
    if ($signed(p4) != -8 || sw4 != 1'b0) begin
      failures++;
      $display("FAIL example 2 x (-4): p=%0d swapped=%0b", $signed(p4), sw4);
    end
    @(posedge clk);

    for (int v = 0; v < 256; v++) begin
      int lat;
      logic exp_sw;
      a4 <= v[7:4]; b4 <= v[3:0]; start4 <= 1'b1;
      @(posedge clk);
      start4 <= 1'b0;
      lat = 0;
      do begin
        @(posedge clk);
        lat++;
      end while (!done4 && lat < 20);
      #1;
      exp_sw = changes(8'(v[7:4]), 4) < changes(8'(v[3:0]), 4);
      checks++;
      if ($signed(p4) != $signed(v[7:4]) * $signed(v[3:0]) || lat != 5 || sw4 != exp_sw) begin
        failures++;
        $display("FAIL N=4 a=%0d b=%0d p=%0d lat=%0d sw=%0b", $signed(v[7:4]),
                 $signed(v[3:0]), $signed(p4), lat, sw4);
      end
      if (sw4) n_swap++; else n_noswap++;
    end

    for (int n = 0; n < 300; n++) begin
      int lat;
      logic [5:0] ta, tb;
      ta = 6'($urandom); tb = 6'($urandom);
      if (n == 0) begin ta = 6'h20; tb = 6'h20; end
      a6 <= ta; b6 <= tb; start6 <= 1'b1;
      @(posedge clk);
      start6 <= 1'b0;
      lat = 0;
      do begin
        @(posedge clk);
        lat++;
      end while (!done6 && lat < 20);
      #1;
      checks++;
      if ($signed(p6) != $signed(ta) * $signed(tb) || lat != 7) begin
        failures++;
        $display("FAIL N=6 a=%0d b=%0d p=%0d lat=%0d", $signed(ta), $signed(tb), $signed(p6), lat);
      end
    end

    $display("steps: add=%0d sub=%0d shift=%0d; operand swaps=%0d kept=%0d",
             n_add, n_sub, n_shift, n_swap, n_noswap);
    checks++; if (n_add == 0)    failures++;
    checks++; if (n_sub == 0)    failures++;
    checks++; if (n_shift == 0)  failures++;
    checks++; if (n_swap == 0)   failures++;
    checks++; if (n_noswap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
