// BVF gate, a 4x4 reversible gate made of two Feynman gates side by side:
// P = A, Q = A xor B, R = C, S = C xor D.
// In the partial product generator it turns two copies of a multiplicand bit
// plus two constant zeros into four copies. Purely combinational. The paper
// names the gate and its fan-out role; the equations are the usual BVF ones.
module bvf_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  assign p = a;
  assign q = a ^ b;
  assign r = c;
  assign s = c ^ d;
endmodule
