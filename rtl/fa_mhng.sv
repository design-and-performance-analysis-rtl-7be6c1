// Reversible full adder: one MHNG gate with its constant input D tied to 0.
// s = a xor b xor ci (gate output R), co = majority(a, b, ci) (output S);
// outputs P and Q are the two garbage outputs g[1:0] = {P, Q}. Purely
// combinational. The one-gate, one-constant, two-garbage structure follows the
// paper.
module fa_mhng (
  input  logic       a,
  input  logic       b,
  input  logic       ci,
  output logic       s,
  output logic       co,
  output logic [1:0] g
);
  mhng_gate u_mhng (.a(a), .b(b), .c(ci), .d(1'b0),
                    .p(g[1]), .q(g[0]), .r(s), .s(co));
endmodule
