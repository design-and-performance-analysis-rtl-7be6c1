// 2:1 multiplexer from one Fredkin (controlled-swap) gate.
// Gate: P = S, Q = S'A + SB, R = S'B + SA, with A = i0 and B = i1. Q is the
// selected input (i0 when s = 0, i1 when s = 1); P and R are garbage outputs,
// g = {P, R}. Purely combinational. The paper names a Fredkin-gate MUX;
// the gate equations are the standard Fredkin definition.
module fredkin_mux2 (
  input  logic       s,
  input  logic       i0,
  input  logic       i1,
  output logic       o,
  output logic [1:0] g
);
  assign o    = (~s & i0) | (s & i1);
  assign g[1] = s;
  assign g[0] = (~s & i1) | (s & i0);
endmodule
