// Ripple carry adder built from reversible MHNG full adders.
//
// Cell k adds a[k], b[k] and the carry from cell k-1 (cin for cell 0); its
// carry goes to cell k+1, the last carry is cout. Each cell is one MHNG gate
// with its constant input at 0 and leaves two garbage outputs:
// garbage[2k+1:2k] belongs to cell k. Purely combinational; the carry ripples
// through WIDTH cells. Using MHNG full adders follows the paper; the width
// is this design's choice (4, to match the 4x4 multipliers).
module rca_mhng #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  input  logic               cin,
  output logic [WIDTH-1:0]   s,
  output logic               cout,
  output logic [2*WIDTH-1:0] garbage
);
  logic [WIDTH:0] c;
  assign c[0] = cin;

  for (genvar k = 0; k < WIDTH; k++) begin : g_cell
    fa_mhng u_fa (.a(a[k]), .b(b[k]), .ci(c[k]), .s(s[k]), .co(c[k+1]),
                  .g(garbage[2*k+1:2*k]));
  end

  assign cout = c[WIDTH];
endmodule
