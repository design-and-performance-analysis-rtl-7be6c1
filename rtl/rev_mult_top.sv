// Top level of the multiplier family.
//
// The three 4x4 unsigned reversible-logic multipliers take the same operands
// x and y and are side by side so that they can be compared:
//   p_m1  Method I   Peres-gate partial products + Peres/MHNG addition array
//   p_m2  Method II  Toffoli-gate partial products + the same addition array
//   p_ut  Urdhva Tiryagbhyam unit from 2x2 cells and MHNG ripple carry adders
// Each brings out its garbage outputs. Beside them, with ports of their own,
// stand the sequential radix-2 Booth multiplier (b2_*, clocked by clk, reset
// by rst_n, N + 1 clocks per product), the combinational radix-4 Booth
// multiplier (b4_*) and the Fredkin-gate 2:1 multiplexer (mx_*).
// The blocks are the paper's; putting them together in one top is this
// design's choice, since the paper uses each on its own.
module rev_mult_top
  import mult_pkg::*;
#(
  parameter int unsigned BOOTH_N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // 4x4 unsigned reversible multipliers
  input  opnd_t                x,
  input  opnd_t                y,
  output prod_t                p_m1,
  output prod_t                p_m2,
  output prod_t                p_ut,
  output logic [39:0]          garbage_m1,
  output logic [27:0]          garbage_m2,
  output logic [65:0]          garbage_ut,
  // radix-2 Booth, sequential
  input  logic                 b2_start,
  input  logic [BOOTH_N-1:0]   b2_a,
  input  logic [BOOTH_N-1:0]   b2_b,
  output logic                 b2_busy,
  output logic                 b2_done,
  output logic [2*BOOTH_N-1:0] b2_p,
  output logic                 b2_swapped,
  // radix-4 Booth, combinational
  input  logic [BOOTH_N-1:0]   b4_a,
  input  logic [BOOTH_N-1:0]   b4_b,
  output logic [2*BOOTH_N-1:0] b4_p,
  // Fredkin-gate multiplexer
  input  logic                 mx_s,
  input  logic                 mx_i0,
  input  logic                 mx_i1,
  output logic                 mx_o,
  output logic [1:0]           mx_g
);
  rev_mult4_m1 u_m1 (.x(x), .y(y), .p(p_m1), .garbage(garbage_m1));
  rev_mult4_m2 u_m2 (.x(x), .y(y), .p(p_m2), .garbage(garbage_m2));
  vedic4x4     u_ut (.x(x), .y(y), .p(p_ut), .garbage(garbage_ut));

  booth_r2_seq #(.N(BOOTH_N)) u_b2 (
    .clk(clk), .rst_n(rst_n), .start(b2_start), .a(b2_a), .b(b2_b),
    .busy(b2_busy), .done(b2_done), .p(b2_p), .swapped(b2_swapped)
  );

  booth_r4 #(.N(BOOTH_N)) u_b4 (.a(b4_a), .b(b4_b), .p(b4_p));

  fredkin_mux2 u_mx (.s(mx_s), .i0(mx_i0), .i1(mx_i1), .o(mx_o), .g(mx_g));
endmodule
