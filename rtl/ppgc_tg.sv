// Toffoli-gate partial product generation circuit of the 4x4 reversible
// multiplier (Method II).
//
// A 4x4 grid of gates forms pp[j][i] = x[i] & y[j] on output R (input C = 0).
// A Toffoli gate passes both of its control inputs through unchanged, so y[j]
// runs along row j (output P to input A of the next gate) and x[i] runs down
// column i (output Q to input B of the gate below): no fan-out circuit is
// needed. In the last row x[i] is not needed any more, so those four gates are
// Peres gates, which are cheaper; their Q output (x xor y) becomes garbage.
//
// garbage[j] is y[j] leaving row j; garbage[4+i] is output Q of the last-row
// gate of column i. Purely combinational. Replacing Toffoli by Peres gates at
// the end of the data path is the paper's; placing them in the last row is
// this design's reading.
module ppgc_tg
  import mult_pkg::*;
(
  input  opnd_t      x,
  input  opnd_t      y,
  output pp_t        pp,
  output logic [7:0] garbage
);
  logic [OPW-1:0][OPW:0]   ya;  // ya[j][i]: y[j] entering column i
  logic [OPW:0][OPW-1:0]   xb;  // xb[j][i]: x[i] entering row j

  for (genvar i = 0; i < OPW; i++) begin : g_xin
    assign xb[0][i] = x[i];
  end

  for (genvar j = 0; j < OPW; j++) begin : g_row
    assign ya[j][0] = y[j];
    for (genvar i = 0; i < OPW; i++) begin : g_col
      if (j < OPW - 1) begin : g_tg
        toffoli_gate u_tg (.a(ya[j][i]), .b(xb[j][i]), .c(1'b0),
                           .p(ya[j][i+1]), .q(xb[j+1][i]), .r(pp[j][i]));
      end else begin : g_pg
        peres_gate u_pg (.a(ya[j][i]), .b(xb[j][i]), .c(1'b0),
                         .p(ya[j][i+1]), .q(xb[j+1][i]), .r(pp[j][i]));
      end
    end
    assign garbage[j] = ya[j][OPW];
  end

  for (genvar i = 0; i < OPW; i++) begin : g_xout
    assign garbage[4+i] = xb[OPW][i];
  end
endmodule
