// Peres gate (PG), a 3x3 reversible gate: P = A, Q = A xor B, R = AB xor C.
// With C = 0, R is the AND of A and B (a partial product) and Q their XOR, so a
// single gate is also a half adder. Purely combinational. The half-adder use
// and the constant-0 input follow the paper; R = AB xor C for a non-zero C
// is the standard Peres gate definition.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
