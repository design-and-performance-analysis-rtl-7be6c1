// MHNG gate, a 4x4 gate used as a one-gate full adder:
//   P = A, Q = D, R = A xor B xor C, S = (A xor B)C xor AB xor D.
// With D = 0, R is the sum and S the carry (majority) of A, B and C.
// Purely combinational. P, Q and R follow the paper's gate definition. The
// last term of S is taken as D, as in the HNG gate this one modifies: the
// definition as printed ends in "xor C", which would not give a carry, while
// the paper uses the gate as a full adder.
module mhng_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  logic ab_x;
  assign ab_x = a ^ b;
  assign p = a;
  assign q = d;
  assign r = ab_x ^ c;
  assign s = (ab_x & c) ^ (a & b) ^ d;
endmodule
