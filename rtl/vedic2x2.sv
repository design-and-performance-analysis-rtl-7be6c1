// 2x2 Urdhva Tiryagbhyam ("vertically and crosswise") multiplier cell.
//
// q[0] = a0 b0 (vertical), q[1] = a1 b0 + a0 b1 (crosswise), q[3:2] =
// a1 b1 plus the crosswise carry (vertical). The four AND terms are Peres
// gates with C = 0, the two additions are Peres half adders. Garbage outputs:
// garbage[2k+1:2k] = {P, Q} of AND gate k (k = 0..3: a0b0, a1b0, a0b1, a1b1),
// garbage[8] and garbage[9] from the two half adders. Purely combinational.
// The paper names only the 4x4 Urdhva Tiryagbhyam unit; this cell and its
// gate choice are this design's.
module vedic2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] q,
  output logic [9:0] garbage
);
  logic t00, t10, t01, t11, c1;

  peres_gate u_and00 (.a(a[0]), .b(b[0]), .c(1'b0), .p(garbage[1]), .q(garbage[0]), .r(t00));
  peres_gate u_and10 (.a(a[1]), .b(b[0]), .c(1'b0), .p(garbage[3]), .q(garbage[2]), .r(t10));
  peres_gate u_and01 (.a(a[0]), .b(b[1]), .c(1'b0), .p(garbage[5]), .q(garbage[4]), .r(t01));
  peres_gate u_and11 (.a(a[1]), .b(b[1]), .c(1'b0), .p(garbage[7]), .q(garbage[6]), .r(t11));

  assign q[0] = t00;
  ha_pg u_ha1 (.a(t10), .b(t01), .s(q[1]), .co(c1),   .g(garbage[8]));
  ha_pg u_ha2 (.a(t11), .b(c1),  .s(q[2]), .co(q[3]), .g(garbage[9]));
endmodule
