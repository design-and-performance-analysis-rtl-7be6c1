// 4x4 unsigned reversible multiplier, Method I.
//
// The Peres-gate partial product generator (with Feynman/BVF fan-out of the
// multiplicand) feeds the addition array of Peres half adders and MHNG full
// adders. p = x * y, combinational, no clock. All 40 garbage outputs are
// brought out so that no gate output is left open: garbage[19:0] from the
// partial product generator, garbage[39:20] from the addition array.
// The two-stage structure follows the paper; that this pairing is the
// paper's "Method I" is inferred from its quantum-cost totals.
module rev_mult4_m1
  import mult_pkg::*;
(
  input  opnd_t       x,
  input  opnd_t       y,
  output prod_t       p,
  output logic [39:0] garbage
);
  pp_t pp;

  ppgc_pg        u_ppgc (.x(x), .y(y), .pp(pp), .garbage(garbage[19:0]));
  addition_array u_add  (.pp(pp), .p(p), .garbage(garbage[39:20]));
endmodule
