// Feynman gate (FG), a 2x2 reversible gate: P = A, Q = A xor B.
// With B tied to 0 it makes a second copy of A, which is how the partial
// product generator uses it for fan-out (reversible logic allows no plain
// fan-out). Purely combinational. The copying use follows the paper; the
// gate equations are the standard Feynman (controlled-NOT) definition.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
