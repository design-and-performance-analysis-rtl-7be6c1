// Carry-lookahead adder, WIDTH bits.
//
// Each bit has a generate g = a & b and a propagate p = a ^ b. Every carry is
// formed directly, not rippled: c[i+1] is the OR over k <= i of g[k] AND all
// p above k up to i, plus cin AND p[i:0]. s = p ^ c. Purely combinational.
// The paper calls for carry-lookahead adders in the radix-4 Booth
// multiplier; the single-level lookahead and the width are this design's.
module cla_adder #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);
  logic [WIDTH-1:0] g, p;
  logic [WIDTH:0]   c;

  assign g = a & b;
  assign p = a ^ b;

  always_comb begin
    c[0] = cin;
    for (int i = 0; i < int'(WIDTH); i++) begin
      logic acc, term;
      // carry in, propagated through bits 0..i
      term = cin;
      for (int m = 0; m <= i; m++) term = term & p[m];
      acc = term;
      // generate at bit k, propagated through bits k+1..i
      for (int k = 0; k <= i; k++) begin
        term = g[k];
        for (int m = k + 1; m <= i; m++) term = term & p[m];
        acc = acc | term;
      end
      c[i+1] = acc;
    end
  end

  assign s    = p ^ c[WIDTH-1:0];
  assign cout = c[WIDTH];
endmodule
