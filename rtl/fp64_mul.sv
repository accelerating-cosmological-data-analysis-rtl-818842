// fp64_mul: pipelined IEEE-754 binary64 multiplier, one product per cycle.
//
// The kernel computes its dot products in double precision; this unit is one of
// the three multipliers of a dot product. Stage 1 multiplies the 53-bit
// significands (hidden bit included) and adds the exponents; stage 2
// normalises by at most one place and rounds to nearest, ties to even, using a
// guard bit and a sticky bit. Result latency is tpacf_pkg::MUL_LAT = 2 cycles,
// no stall input: an operand pair presented in cycle t gives its product on
// `p` after the rising edges of t and t+1.
//
// Design choices (the source kernel relied on a library core whose insides are
// not given): subnormal inputs and results are flushed to signed zero,
// overflow saturates to infinity, and NaN / infinity inputs are not treated
// specially. Coordinates of unit vectors never reach those cases.
module fp64_mul
  import tpacf_pkg::*;
(
  input  logic  clk,
  input  fp64_t a,
  input  fp64_t b,
  output fp64_t p
);

  // ---- stage 1: significand product, exponent sum --------------------------
  logic         s1_sign;
  logic         s1_zero;
  logic [12:0]  s1_exp;     // biased sum minus bias, signed range
  logic [105:0] s1_prod;

  always_ff @(posedge clk) begin
    s1_sign <= a.sign ^ b.sign;
    s1_zero <= fp64_is_zero(a) || fp64_is_zero(b);
    s1_exp  <= {2'b00, a.exp} + {2'b00, b.exp} - 13'd1023;
    s1_prod <= {1'b1, a.frac} * {1'b1, b.frac};
  end

  // ---- stage 2: normalise, round, pack -------------------------------------
  logic [52:0] mant;
  logic        guard, sticky, round_up;
  logic [53:0] mant_r;
  logic [12:0] exp_n, exp_r;
  fp64_t       res;

  always_comb begin
    if (s1_prod[105]) begin
      mant   = s1_prod[105:53];
      guard  = s1_prod[52];
      sticky = |s1_prod[51:0];
      exp_n  = s1_exp + 13'd1;
    end else begin
      mant   = s1_prod[104:52];
      guard  = s1_prod[51];
      sticky = |s1_prod[50:0];
      exp_n  = s1_exp;
    end
    round_up = guard & (sticky | mant[0]);
    mant_r   = {1'b0, mant} + {53'd0, round_up};
    exp_r    = mant_r[53] ? exp_n + 13'd1 : exp_n;

    res.sign = s1_sign;
    if (s1_zero || $signed(exp_r) <= 0) begin
      res.exp  = 11'd0;
      res.frac = 52'd0;
    end else if ($signed(exp_r) >= 13'sd2047) begin
      res.exp  = EXP_MAX;
      res.frac = 52'd0;
    end else begin
      res.exp  = exp_r[10:0];
      // after a rounding carry the significand is exactly 1.0 (all zeros)
      res.frac = mant_r[53] ? 52'd0 : mant_r[51:0];
    end
  end

  always_ff @(posedge clk) p <= res;

endmodule
