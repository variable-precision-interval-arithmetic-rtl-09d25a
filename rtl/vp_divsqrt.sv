// vp_divsqrt: significand divider and square-root unit, one result bit per
// cycle (restoring algorithms).
//
// Operands are loaded word by word (M bits, most significant word first) into
// two RW-bit registers, A (dividend or radicand) and B (divisor); words not
// loaded are zero. The significands are fixed-point numbers 1.xxx with the
// binary point after the top bit.
//  * Division: starting from R = A, each step compares the partial remainder
//    with B, subtracts when it is not smaller, emits the quotient bit and
//    doubles the remainder. The first bit has weight 1, so the quotient
//    A/B in (1/2, 2) appears with its binary point after bit NQ-1.
//  * Square root: the radicand (A, or 2A when the caller sets odd to make the
//    exponent even) is consumed two bits per step; the classical restoring
//    digit recurrence (trial value 4Y+1) yields one root bit per step, first
//    bit of weight 1, root in [1, 2).
// nq result bits are produced (nq <= RW + 4); rem_nz tells whether the
// remainder is non-zero (the result is inexact), which the caller uses as the
// sticky bit when rounding.
//
// Timing: load with ld_we (one word of A and one of B per cycle); start for
// one cycle; busy for nq cycles; done pulses in the cycle after the last bit.
// q holds the result bits in q[nq-1:0], most significant first.
//
// The document names a short-reciprocal division and a similar square-root
// algorithm without giving their steps; this unit is the simplest
// replacement that gives correctly rounded results through the same
// accumulator rounding path. Its cycle count (about one cycle per result bit)
// therefore differs from the published counts.
module vp_divsqrt #(
  parameter int unsigned M    = 32,
  parameter int unsigned MAXW = 32,
  localparam int unsigned RW  = M * MAXW,
  localparam int unsigned QW  = RW + 4,
  localparam int unsigned CW  = $clog2(QW + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,       // zero A and B before loading
  input  logic                     ld_we,
  input  logic [$clog2(MAXW)-1:0]  ld_idx,
  input  logic                     ld_a_en,
  input  logic [M-1:0]             ld_a,
  input  logic                     ld_b_en,
  input  logic [M-1:0]             ld_b,
  input  logic                     start,
  input  logic                     sqrt_mode,
  input  logic                     odd,        // square root of 2A instead of A
  input  logic [CW-1:0]            nq,
  output logic                     busy,
  output logic                     done,
  output logic [QW-1:0]            q,
  output logic                     rem_nz
);
  logic [RW-1:0]  a_q, b_q;
  logic [RW+4:0]  r_q;           // partial remainder
  logic [2*RW+3:0] rad_q;        // radicand bits still to be consumed
  logic [CW-1:0]  cnt;

  // one division step
  logic [RW+4:0] d_trial;
  logic          d_ge;
  assign d_ge    = r_q >= {5'b0, b_q};
  assign d_trial = r_q - {5'b0, b_q};

  // one square-root step: R' = 4R + next two radicand bits, T = 4Y + 1
  logic [RW+6:0] s_r4, s_t;
  logic          s_ge;
  assign s_r4 = {r_q, rad_q[2*RW+3 -: 2]};
  assign s_t  = {1'b0, q, 2'b01};
  assign s_ge = s_r4 >= s_t;

  assign busy = (cnt != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0; b_q <= '0; r_q <= '0; rad_q <= '0; q <= '0;
      cnt <= '0; done <= 1'b0; rem_nz <= 1'b0;
    end else begin
      done <= 1'b0;
      if (clr) begin
        a_q <= '0;
        b_q <= '0;
      end else if (ld_we) begin
        if (ld_a_en) a_q[RW - 1 - M * int'(ld_idx) -: M] <= ld_a;
        if (ld_b_en) b_q[RW - 1 - M * int'(ld_idx) -: M] <= ld_b;
      end
      if (start) begin
        q   <= '0;
        rem_nz <= 1'b0;
        cnt <= nq;
        if (sqrt_mode) begin
          // radicand 1.xxx (or 1x.xxx when odd) with two integer bits
          r_q   <= '0;
          rad_q <= odd ? {a_q, {(RW+4){1'b0}}} : {1'b0, a_q, {(RW+3){1'b0}}};
        end else begin
          r_q   <= {5'b0, a_q};
        end
      end else if (cnt != '0) begin
        cnt <= cnt - 1'b1;
        if (sqrt_mode) begin
          rad_q <= rad_q << 2;
          if (s_ge) begin
            r_q <= (RW+5)'(s_r4 - s_t);
            q   <= {q[QW-2:0], 1'b1};
          end else begin
            r_q <= (RW+5)'(s_r4);
            q   <= {q[QW-2:0], 1'b0};
          end
        end else begin
          if (d_ge) begin
            r_q <= d_trial << 1;
            q   <= {q[QW-2:0], 1'b1};
          end else begin
            r_q <= r_q << 1;
            q   <= {q[QW-2:0], 1'b0};
          end
        end
        if (cnt == CW'(1)) begin
          done <= 1'b1;
        end
      end
      if (cnt == CW'(1) && !start) begin
        // remainder after the last step
        if (sqrt_mode) rem_nz <= s_ge ? ((s_r4 - s_t) != '0) || (rad_q[2*RW+1:0] != '0)
                                      : (s_r4 != '0) || (rad_q[2*RW+1:0] != '0);
        else           rem_nz <= d_ge ? (d_trial != '0) : (r_q != '0);
      end
    end
  end
endmodule
