// Reversible half adder: one Peres gate with its third input tied to 0.
// s = a xor b (gate output Q), co = a and b (output R); output P (a copy of a)
// is a garbage output. Purely combinational. Structure as in the paper.
module ha_pg (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co,
  output logic g
);
  peres_gate u_pg (.a(a), .b(b), .c(1'b0), .p(g), .q(s), .r(co));
endmodule
