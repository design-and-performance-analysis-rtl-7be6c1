// 4x4 unsigned reversible multiplier, Method II.
//
// The Toffoli-gate partial product generator, which passes both operands from
// gate to gate and so needs no fan-out circuit, feeds the same addition array
// as Method I. p = x * y, combinational. garbage[7:0] comes from the partial
// product generator, garbage[27:8] from the addition array.
// Reading the paper's "Method II" as this variant is this design's choice.
module rev_mult4_m2
  import mult_pkg::*;
(
  input  opnd_t       x,
  input  opnd_t       y,
  output prod_t       p,
  output logic [27:0] garbage
);
  pp_t pp;

  ppgc_tg        u_ppgc (.x(x), .y(y), .pp(pp), .garbage(garbage[7:0]));
  addition_array u_add  (.pp(pp), .p(p), .garbage(garbage[27:8]));
endmodule
