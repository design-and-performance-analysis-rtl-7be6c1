// End-to-end testbench of rev_mult_top at its default parameters.
//
// The three 4x4 unsigned reversible multipliers are checked on all 256
// operand pairs against the integer product and against each other. The
// radix-2 Booth multiplier runs all 256 signed 4-bit pairs through its
// start/done handshake (latency N + 1 clocks) while the radix-4 Booth
// multiplier gets the same operands; the Fredkin multiplexer gets all eight
// input combinations. Mechanisms counted, each of which must occur at least
// once: a product needing the top bit p[7]; Booth add, subtract and
// shift-only steps; both choices of multiplier operand; each radix-4 recoding
// (0, +Y, +2Y, -Y, -2Y); each multiplexer selection. The worked example of
// 2 x (-4) is among the pairs.
module tb_rev_mult_top;
  import mult_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_top = 0, n_add = 0, n_sub = 0, n_shift = 0, n_swap = 0, n_noswap = 0;
  int n_sel0 = 0, n_sel1 = 0;
  int seen4 [5];

  logic        rst_n;
  opnd_t       x, y;
  prod_t       p_m1, p_m2, p_ut;
  logic [39:0] garbage_m1;
  logic [27:0] garbage_m2;
  logic [65:0] garbage_ut;
  logic        b2_start, b2_busy, b2_done, b2_swapped;
  logic [3:0]  b2_a, b2_b, b4_a, b4_b;
  logic [7:0]  b2_p, b4_p;
  logic        mx_s, mx_i0, mx_i1, mx_o;
  logic [1:0]  mx_g;

  rev_mult_top dut (.*);

  always @(posedge clk) begin
    if (b2_busy) begin
      unique case ({dut.u_b2.x[0], dut.u_b2.xm1})
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
    foreach (seen4[i]) seen4[i] = 0;
    rst_n = 1'b0; b2_start = 1'b0; b2_a = '0; b2_b = '0; b4_a = '0; b4_b = '0;
    x = '0; y = '0; mx_s = 1'b0; mx_i0 = 1'b0; mx_i1 = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // 4x4 unsigned reversible multipliers
    for (int v = 0; v < 256; v++) begin
      int expv;
      {x, y} = 8'(v);
      expv = int'(x) * int'(y);
      @(posedge clk);
      checks++;
      if (int'(p_m1) != expv || int'(p_m2) != expv || int'(p_ut) != expv) begin
        failures++;
        $display("FAIL x=%0d y=%0d m1=%0d m2=%0d ut=%0d", x, y, p_m1, p_m2, p_ut);
      end
      if (expv >= 128) n_top++;
    end

    // Booth multipliers, signed
    for (int v = 0; v < 256; v++) begin
      int lat, expv;
      logic [4:0] bz;
      logic [3:0] ta, tb;
      {ta, tb} = 8'(v);
      if (v == 0) begin ta = 4'b0010; tb = 4'b1100; end  // 2 x (-4)
      expv = int'($signed(ta)) * int'($signed(tb));
      b2_a <= ta; b2_b <= tb; b2_start <= 1'b1;
      b4_a <= ta; b4_b <= tb;
      @(posedge clk);
      b2_start <= 1'b0;
      lat = 0;
      do begin
        @(posedge clk);
        lat++;
      end while (!b2_done && lat < 20);
      #1;
      checks++;
      if (int'($signed(b2_p)) != expv || lat != 5) begin
        failures++;
        $display("FAIL booth2 a=%0d b=%0d p=%0d lat=%0d", $signed(ta), $signed(tb), $signed(b2_p), lat);
      end
      checks++;
      if (int'($signed(b4_p)) != expv) begin
        failures++;
        $display("FAIL booth4 a=%0d b=%0d p=%0d", $signed(ta), $signed(tb), $signed(b4_p));
      end
      if (b2_swapped) n_swap++; else n_noswap++;
      bz = {tb, 1'b0};
      for (int k = 0; k < 2; k++)
        seen4[-2 * int'(bz[2*k+2]) + int'(bz[2*k+1]) + int'(bz[2*k]) + 2]++;
    end

    // Fredkin multiplexer
    for (int v = 0; v < 8; v++) begin
      {mx_s, mx_i0, mx_i1} = 3'(v);
      @(posedge clk);
      checks++;
      if (mx_o !== (mx_s ? mx_i1 : mx_i0)) failures++;
      if (mx_s) n_sel1++; else n_sel0++;
    end

    $display("mechanisms: top-bit products=%0d booth2 add=%0d sub=%0d shift=%0d swap=%0d keep=%0d",
             n_top, n_add, n_sub, n_shift, n_swap, n_noswap);
    $display("radix-4 recodings -2Y..+2Y: %0d %0d %0d %0d %0d; mux sel0=%0d sel1=%0d",
             seen4[0], seen4[1], seen4[2], seen4[3], seen4[4], n_sel0, n_sel1);
    checks++; if (n_top == 0)    failures++;
    checks++; if (n_add == 0)    failures++;
    checks++; if (n_sub == 0)    failures++;
    checks++; if (n_shift == 0)  failures++;
    checks++; if (n_swap == 0)   failures++;
    checks++; if (n_noswap == 0) failures++;
    checks++; if (n_sel0 == 0 || n_sel1 == 0) failures++;
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (seen4[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
