// Addition array of the 4x4 unsigned reversible multiplier.
//
// Sums the sixteen partial products pp[j][i] = x[i]*y[j] (weight 2^(i+j)) into
// the 8-bit product. Three carry-save rows reduce the columns and a last row
// ripples the remaining carries:
//   row 1: three half adders on columns 1..3 -> p[1]
//   row 2: three full adders on columns 2..4 -> p[2]
//   row 3: three full adders on columns 3..5 -> p[3]
//   row 4: half adder (column 4), full adders (columns 5, 6) -> p[4..7]
// p[0] = pp[0][0] passes straight through. Half adders are single Peres gates,
// full adders single MHNG gates, so the array has 12 gates, 12 constant inputs
// and 20 garbage outputs: garbage[2k+1:2k] from full adder k (k = 0..7, rows
// 2, 3, 4 in order) and garbage[16+h] from half adder h (h = 0..3).
// Purely combinational. The cell count and row shape follow the paper; the
// assignment of summands to cells follows column weight.
module addition_array
  import mult_pkg::*;
(
  input  pp_t         pp,
  output prod_t       p,
  output logic [19:0] garbage
);
  // s_rX_cY / c_rX_cY: sum / carry of the cell in row X, column Y
  logic s_r1_c1, s_r1_c2, s_r1_c3, c_r1_c1, c_r1_c2, c_r1_c3;
  logic s_r2_c2, s_r2_c3, s_r2_c4, c_r2_c2, c_r2_c3, c_r2_c4;
  logic s_r3_c3, s_r3_c4, s_r3_c5, c_r3_c3, c_r3_c4, c_r3_c5;
  logic s_r4_c4, s_r4_c5, s_r4_c6, c_r4_c4, c_r4_c5, c_r4_c6;

  assign p[0] = pp[0][0];

  // Row 1
  ha_pg u_r1_c1 (.a(pp[0][1]), .b(pp[1][0]), .s(s_r1_c1), .co(c_r1_c1), .g(garbage[16]));
  ha_pg u_r1_c2 (.a(pp[0][2]), .b(pp[1][1]), .s(s_r1_c2), .co(c_r1_c2), .g(garbage[17]));
  ha_pg u_r1_c3 (.a(pp[0][3]), .b(pp[1][2]), .s(s_r1_c3), .co(c_r1_c3), .g(garbage[18]));
  assign p[1] = s_r1_c1;

  // Row 2
  fa_mhng u_r2_c2 (.a(s_r1_c2),  .b(pp[2][0]), .ci(c_r1_c1), .s(s_r2_c2), .co(c_r2_c2), .g(garbage[1:0]));
  fa_mhng u_r2_c3 (.a(s_r1_c3),  .b(pp[2][1]), .ci(c_r1_c2), .s(s_r2_c3), .co(c_r2_c3), .g(garbage[3:2]));
  fa_mhng u_r2_c4 (.a(pp[1][3]), .b(pp[2][2]), .ci(c_r1_c3), .s(s_r2_c4), .co(c_r2_c4), .g(garbage[5:4]));
  assign p[2] = s_r2_c2;

  // Row 3
  fa_mhng u_r3_c3 (.a(s_r2_c3),  .b(pp[3][0]), .ci(c_r2_c2), .s(s_r3_c3), .co(c_r3_c3), .g(garbage[7:6]));
  fa_mhng u_r3_c4 (.a(s_r2_c4),  .b(pp[3][1]), .ci(c_r2_c3), .s(s_r3_c4), .co(c_r3_c4), .g(garbage[9:8]));
  fa_mhng u_r3_c5 (.a(pp[2][3]), .b(pp[3][2]), .ci(c_r2_c4), .s(s_r3_c5), .co(c_r3_c5), .g(garbage[11:10]));
  assign p[3] = s_r3_c3;

  // Row 4: ripple of the remaining carries
  ha_pg   u_r4_c4 (.a(s_r3_c4), .b(c_r3_c3), .s(s_r4_c4), .co(c_r4_c4), .g(garbage[19]));
  fa_mhng u_r4_c5 (.a(s_r3_c5), .b(c_r3_c4), .ci(c_r4_c4), .s(s_r4_c5), .co(c_r4_c5), .g(garbage[13:12]));
  fa_mhng u_r4_c6 (.a(pp[3][3]), .b(c_r3_c5), .ci(c_r4_c5), .s(s_r4_c6), .co(c_r4_c6), .g(garbage[15:14]));
  assign p[4] = s_r4_c4;
  assign p[5] = s_r4_c5;
  assign p[6] = s_r4_c6;
  assign p[7] = c_r4_c6;
endmodule
