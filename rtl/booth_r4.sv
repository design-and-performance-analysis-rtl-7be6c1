// Radix-4 (modified) Booth multiplier, signed, combinational.
//
// The multiplier b (sign-extended by one bit if N is odd, so its width NE is
// even) gets a 0 appended below its LSB and is scanned in overlapping
// triplets (b[2k+1], b[2k], b[2k-1]), k = 0..NE/2-1. Each triplet selects a
// partial product of 0, +Y, +2Y, -Y or -2Y (Y = a sign-extended), weighted by
// 4^k: only NE/2 partial products. 2Y is Y shifted left by one. A negative
// partial product is the bit inverse of the shifted magnitude, and the +1 that
// completes its two's complement enters as the carry in of the carry-lookahead
// adder that accumulates it, so all additions run through cla_adder.
// p = a * b (2N bits, two's complement).
// The recoding rules, the n/2 partial products and the CLA adders follow the
// paper; the width N and the adder chain are this design's.
module booth_r4
  import mult_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int unsigned NE = N + (N % 2);
  localparam int unsigned K  = NE / 2;
  localparam int unsigned W  = 2 * NE;

  logic [NE:0]           bz;      // {b sign-extended, 0}
  logic [W-1:0]          ys;      // Y sign-extended to W bits
  logic [K-1:0][W-1:0]   ppv;     // partial products, inverted when negative
  logic [K-1:0]          neg;
  booth4_op_e            op [K];
  logic [K:0][W-1:0]     acc;

  assign bz = {{(NE-N){b[N-1]}}, b, 1'b0};
  assign ys = W'($signed(a));

  always_comb begin
    for (int k = 0; k < int'(K); k++) begin
      logic [W-1:0] mag;
      op[k] = booth4_decode(bz[2*k +: 3]);
      unique case (op[k])
        B4_P1, B4_M1: mag = ys;
        B4_P2, B4_M2: mag = ys << 1;
        default:      mag = '0;
      endcase
      mag    = mag << (2 * k);
      neg[k] = (op[k] == B4_M1) || (op[k] == B4_M2);
      ppv[k] = neg[k] ? ~mag : mag;
    end
  end

  assign acc[0] = '0;
  for (genvar k = 0; k < K; k++) begin : g_acc
    logic unused_cout;
    cla_adder #(.WIDTH(W)) u_cla (.a(acc[k]), .b(ppv[k]), .cin(neg[k]),
                                  .s(acc[k+1]), .cout(unused_cout));
  end

  assign p = acc[K][2*N-1:0];
endmodule
