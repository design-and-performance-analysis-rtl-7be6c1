// Shared types and constants of the multiplier family.
//
// OPW is the operand width of the fixed 4x4 unsigned reversible multipliers and
// PW their product width. booth2_op_e names the three actions of a radix-2 Booth
// step, chosen from the multiplier bit pair (X0, X-1). booth4_op_e names the five
// partial-product selections of a radix-4 (modified) Booth digit, chosen from an
// overlapping bit triplet. The recoding functions are shared by the Booth
// multipliers so that both use one definition.
package mult_pkg;

  localparam int unsigned OPW = 4;
  localparam int unsigned PW  = 2 * OPW;

  typedef logic [OPW-1:0] opnd_t;
  typedef logic [PW-1:0]  prod_t;
  // Partial products of a 4x4 multiplier: pp[j][i] = x[i] & y[j].
  typedef logic [OPW-1:0][OPW-1:0] pp_t;

  typedef enum logic [1:0] {
    B2_SHIFT = 2'd0,  // 00 or 11: shift only
    B2_ADD   = 2'd1,  // 01: add Y to U, then shift
    B2_SUB   = 2'd2   // 10: subtract Y from U, then shift
  } booth2_op_e;

  typedef enum logic [2:0] {
    B4_ZERO = 3'd0,
    B4_P1   = 3'd1,   // +Y
    B4_P2   = 3'd2,   // +2Y
    B4_M1   = 3'd3,   // -Y
    B4_M2   = 3'd4    // -2Y
  } booth4_op_e;

  // Radix-2 rule on (X0, X-1).
  function automatic booth2_op_e booth2_decode(input logic x0, input logic xm1);
    unique case ({x0, xm1})
      2'b01:   return B2_ADD;
      2'b10:   return B2_SUB;
      default: return B2_SHIFT;
    endcase
  endfunction

  // Radix-4 rule on the triplet (b[2i+1], b[2i], b[2i-1]).
  function automatic booth4_op_e booth4_decode(input logic [2:0] t);
    unique case (t)
      3'b001, 3'b010: return B4_P1;
      3'b011:         return B4_P2;
      3'b100:         return B4_M2;
      3'b101, 3'b110: return B4_M1;
      default:        return B4_ZERO;  // 000, 111
    endcase
  endfunction

endpackage
