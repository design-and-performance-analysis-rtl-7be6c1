// 4x4 unsigned Urdhva Tiryagbhyam (Vedic) multiplier unit.
//
// The operands are split into halves, x = {xh, xl}, y = {yh, yl}, and four 2x2
// Urdhva Tiryagbhyam cells form q0 = xl*yl, q1 = xh*yl, q2 = xl*yh and
// q3 = xh*yh. Three 4-bit MHNG ripple carry adders combine them:
//   adder 1: q1 + q2                          -> s1, carry c1
//   adder 2: s1 + q0[3:2]                     -> s2, carry c2 (p[3:2] = s2[1:0])
//   adder 3: q3 + {0, c1 xor c2, s2[3:2]}     -> p[7:4]
// c1 and c2 are never both 1, so a Feynman gate's XOR merges them. p = x * y,
// combinational. garbage: 4 x 10 from the 2x2 cells, 3 x 8 from the adders,
// 1 from the Feynman gate and the (always zero) carry out of adder 3.
// The paper names this unit and evaluates it with MHNG adders; the split
// into 2x2 cells and three adders is this design's choice.
module vedic4x4
  import mult_pkg::*;
(
  input  opnd_t       x,
  input  opnd_t       y,
  output prod_t       p,
  output logic [65:0] garbage
);
  logic [3:0] q0, q1, q2, q3;
  logic [3:0] s1, s2, b3;
  logic       c1, c2, cmerge;

  vedic2x2 u_v0 (.a(x[1:0]), .b(y[1:0]), .q(q0), .garbage(garbage[9:0]));
  vedic2x2 u_v1 (.a(x[3:2]), .b(y[1:0]), .q(q1), .garbage(garbage[19:10]));
  vedic2x2 u_v2 (.a(x[1:0]), .b(y[3:2]), .q(q2), .garbage(garbage[29:20]));
  vedic2x2 u_v3 (.a(x[3:2]), .b(y[3:2]), .q(q3), .garbage(garbage[39:30]));

  rca_mhng #(.WIDTH(4)) u_add1 (.a(q1), .b(q2), .cin(1'b0), .s(s1), .cout(c1),
                                .garbage(garbage[47:40]));
  rca_mhng #(.WIDTH(4)) u_add2 (.a(s1), .b({2'b00, q0[3:2]}), .cin(1'b0), .s(s2), .cout(c2),
                                .garbage(garbage[55:48]));
  feynman_gate u_merge (.a(c1), .b(c2), .p(garbage[64]), .q(cmerge));
  assign b3 = {1'b0, cmerge, s2[3:2]};
  rca_mhng #(.WIDTH(4)) u_add3 (.a(q3), .b(b3), .cin(1'b0), .s(p[7:4]), .cout(garbage[65]),
                                .garbage(garbage[63:56]));

  assign p[1:0] = q0[1:0];
  assign p[3:2] = s2[1:0];
endmodule
