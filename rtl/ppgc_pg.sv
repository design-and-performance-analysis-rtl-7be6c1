// Peres-gate partial product generation circuit of the 4x4 reversible
// multiplier.
//
// Reversible logic forbids fan-out, so every multiplicand bit x[i] is first
// copied four times: a Feynman gate with a 0 input makes two copies, and a
// BVF gate with two 0 inputs doubles them to four. A 4x4 grid of Peres gates
// then forms the sixteen products pp[j][i] = x[i] & y[j] on output R (input
// C = 0). The multiplier bit y[j] enters input A of the first gate of row j and
// is handed on from output P to input A of the next gate in the row, so it
// needs no copying. Totals: 24 gates, 28 constant inputs, 20 garbage outputs.
//
// garbage[4*j+i] is output Q of the gate in row j, column i (x[i] xor y[j]);
// garbage[16+j] is output P of the last gate of row j (y[j]).
// Purely combinational. The structure follows the paper; which gate input
// takes which operand follows its description of y passing from P to A.
module ppgc_pg
  import mult_pkg::*;
(
  input  opnd_t       x,
  input  opnd_t       y,
  output pp_t         pp,
  output logic [19:0] garbage
);
  // xc[i][k]: copy k of x[i]
  logic [OPW-1:0][3:0] xc;
  logic [OPW-1:0][1:0] fg_out;
  // ya[j][i]: y[j] as it enters column i of row j (ya[j][4] leaves the row)
  logic [OPW-1:0][OPW:0] ya;

  for (genvar i = 0; i < OPW; i++) begin : g_fanout
    feynman_gate u_fg (.a(x[i]), .b(1'b0), .p(fg_out[i][0]), .q(fg_out[i][1]));
    bvf_gate u_bvf (.a(fg_out[i][0]), .b(1'b0), .c(fg_out[i][1]), .d(1'b0),
                    .p(xc[i][0]), .q(xc[i][1]), .r(xc[i][2]), .s(xc[i][3]));
  end

  for (genvar j = 0; j < OPW; j++) begin : g_row
    assign ya[j][0] = y[j];
    for (genvar i = 0; i < OPW; i++) begin : g_col
      peres_gate u_pg (.a(ya[j][i]), .b(xc[i][j]), .c(1'b0),
                       .p(ya[j][i+1]), .q(garbage[4*j+i]), .r(pp[j][i]));
    end
    assign garbage[16+j] = ya[j][OPW];
  end
endmodule
