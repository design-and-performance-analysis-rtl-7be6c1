// Toffoli gate (TG), a 3x3 reversible gate: P = A, Q = B, R = AB xor C.
// Both control inputs come out unchanged, so in a grid of these gates both
// operand bits can be passed on to the next gate; with C = 0, R = A AND B.
// Purely combinational; standard Toffoli equations.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
endmodule
