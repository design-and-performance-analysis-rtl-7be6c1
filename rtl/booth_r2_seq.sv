// Sequential radix-2 Booth multiplier, signed two's complement, N x N bits.
//
// On start the operand with fewer changes between neighbouring bits becomes
// the multiplier X and the other the multiplicand Y (swapped = 1 when a is the
// multiplier; on a tie b is). U and V are cleared and X-1 is set to 0. Then,
// once per clock for N clocks, the pair (X0, X-1) selects the step:
//   01: U = U + Y      10: U = U - Y      00, 11: U unchanged
// after which U:V is shifted right arithmetically (the sign of U is kept),
// X0 moves into X-1 and X is rotated right, so X needs no second register.
// After N steps U:V holds the product.
//
// Interface: start is sampled while idle; busy is high for the N step cycles;
// done pulses for one cycle with p valid, and p holds until the next start.
// Latency: N + 1 clocks from the start cycle to done. Reset is active low and
// synchronous.
// The step rules, the shifts and the choice of multiplier follow the
// paper; the handshake, the reset and the extra guard bit in U (so that
// U +/- Y never overflows) are this design's.
module booth_r2_seq
  import mult_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic           busy,
  output logic           done,
  output logic [2*N-1:0] p,
  output logic           swapped
);
  localparam int unsigned CW = $clog2(N + 1);

  typedef enum logic { S_IDLE, S_RUN } state_e;

  state_e          state;
  logic [N:0]      u, y;      // one guard bit above N
  logic [N-1:0]    v, x;
  logic            xm1;
  logic [CW-1:0]   cnt;

  // Number of changes between neighbouring bits.
  function automatic int unsigned changes(input logic [N-1:0] val);
    int unsigned n = 0;
    for (int i = 1; i < int'(N); i++) n += {31'd0, val[i] ^ val[i-1]};
    return n;
  endfunction

  booth2_op_e      op;
  logic [N:0]      u_next;
  logic [2*N:0]    uv_shift;

  always_comb begin
    op = booth2_decode(x[0], xm1);
    unique case (op)
      B2_ADD:  u_next = u + y;
      B2_SUB:  u_next = u - y;
      default: u_next = u;
    endcase
    uv_shift = $signed({u_next, v}) >>> 1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      u       <= '0;
      v       <= '0;
      x       <= '0;
      y       <= '0;
      xm1     <= 1'b0;
      cnt     <= '0;
      done    <= 1'b0;
      p       <= '0;
      swapped <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            if (changes(a) < changes(b)) begin
              x       <= a;
              y       <= {b[N-1], b};
              swapped <= 1'b1;
            end else begin
              x       <= b;
              y       <= {a[N-1], a};
              swapped <= 1'b0;
            end
            u     <= '0;
            v     <= '0;
            xm1   <= 1'b0;
            cnt   <= '0;
            state <= S_RUN;
          end
        end
        S_RUN: begin
          {u, v} <= uv_shift;
          xm1    <= x[0];
          x      <= {x[0], x[N-1:1]};
          cnt    <= cnt + 1'b1;
          if (cnt == CW'(N - 1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
            p     <= uv_shift[2*N-1:0];
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state == S_RUN);

  // done is a single-cycle pulse and only ends a run.
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n) done |=> !done);
  a_done_after_run: assert property (@(posedge clk) disable iff (!rst_n) done |-> $past(busy));
endmodule
