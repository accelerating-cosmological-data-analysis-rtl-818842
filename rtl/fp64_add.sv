// fp64_add: pipelined IEEE-754 binary64 adder, one sum per cycle.
//
// Two of these sum the three coordinate products of a dot product. Stage 1
// orders the operands by magnitude and shifts the smaller significand right by
// the exponent difference, keeping a guard, a round and a sticky bit. Stage 2
// adds or subtracts, renormalises (one place right after a carry, or left by
// the leading-zero count after cancellation) and rounds to nearest, ties to
// even. Latency is tpacf_pkg::ADD_LAT = 2 cycles, fully pipelined, no stall.
//
// Design choices (the source kernel used a library core whose insides are not
// given): subnormals are flushed to zero, an exact cancellation gives +0,
// overflow saturates to infinity, NaN / infinity are not treated specially.
module fp64_add
  import tpacf_pkg::*;
(
  input  logic  clk,
  input  fp64_t a,
  input  fp64_t b,
  output fp64_t s
);

  // ---- stage 1: order and align --------------------------------------------
  fp64_t       bigop, smallop;
  logic [11:0] ediff;
  logic [55:0] m_small_sh;   // {1, frac, g, r, s} after the alignment shift
  logic [55:0] m_small;
  logic        sticky_sh;

  always_comb begin
    logic [62:0] mag_a, mag_b;
    mag_a = fp64_is_zero(a) ? 63'd0 : {a.exp, a.frac};
    mag_b = fp64_is_zero(b) ? 63'd0 : {b.exp, b.frac};
    if (mag_a >= mag_b) begin
      bigop   = a;  smallop = b;
    end else begin
      bigop   = b;  smallop = a;
    end
    if (fp64_is_zero(bigop))   begin bigop.exp   = 11'd0; bigop.frac   = 52'd0; end
    if (fp64_is_zero(smallop)) begin smallop.exp = 11'd0; smallop.frac = 52'd0; end
    ediff   = {1'b0, bigop.exp} - {1'b0, smallop.exp};
    m_small = fp64_is_zero(smallop) ? 56'd0 : {1'b1, smallop.frac, 3'b000};
    if (ediff >= 12'd56) begin
      m_small_sh = 56'd0;
      sticky_sh  = |m_small;
    end else begin
      m_small_sh = m_small >> ediff;
      sticky_sh  = |(m_small & ~(56'hFF_FFFF_FFFF_FFFF << ediff));
    end
    m_small_sh[0] = m_small_sh[0] | sticky_sh;
  end

  logic        s1_sign, s1_sub, s1_bigzero;
  logic [10:0] s1_exp;
  logic [55:0] s1_mb, s1_ms;

  always_ff @(posedge clk) begin
    s1_sign    <= bigop.sign;
    s1_sub     <= bigop.sign ^ smallop.sign;
    s1_bigzero <= fp64_is_zero(bigop);
    s1_exp     <= bigop.exp;
    s1_mb      <= fp64_is_zero(bigop) ? 56'd0 : {1'b1, bigop.frac, 3'b000};
    s1_ms      <= m_small_sh;
  end

  // ---- stage 2: add / subtract, normalise, round, pack ----------------------
  logic [56:0] sum;
  logic [55:0] norm;
  logic [12:0] exp_n;
  logic [5:0]  lz;
  logic        found;
  logic        guard, stk, round_up;
  logic [53:0] mant_r;
  logic [12:0] exp_r;
  fp64_t       res;

  always_comb begin
    sum = s1_sub ? ({1'b0, s1_mb} - {1'b0, s1_ms}) : ({1'b0, s1_mb} + {1'b0, s1_ms});
    lz    = 6'd0;
    found = 1'b0;
    for (int i = 55; i >= 0; i--) begin
      if (!found && sum[i]) begin
        found = 1'b1;
        lz    = 6'(55 - i);
      end
    end
    if (sum[56]) begin
      norm  = {sum[56:2], sum[1] | sum[0]};
      exp_n = {2'b00, s1_exp} + 13'd1;
    end else begin
      norm  = sum[55:0] << lz;
      exp_n = {2'b00, s1_exp} - {7'd0, lz};
    end
    guard    = norm[2];
    stk      = norm[1] | norm[0];
    round_up = guard & (stk | norm[3]);
    mant_r   = {1'b0, norm[55:3]} + {53'd0, round_up};
    exp_r    = mant_r[53] ? exp_n + 13'd1 : exp_n;

    res.sign = s1_sign;
    if (s1_bigzero) begin
      res = '0;
      res.sign = s1_sign & ~s1_sub;         // (-0) + (-0) = -0, else +0
    end else if (sum == 57'd0 || $signed(exp_r) <= 0) begin
      res = '0;
    end else if ($signed(exp_r) >= 13'sd2047) begin
      res.exp  = EXP_MAX;
      res.frac = 52'd0;
    end else begin
      res.exp  = exp_r[10:0];
      res.frac = mant_r[53] ? 52'd0 : mant_r[51:0];
    end
  end

  always_ff @(posedge clk) s <= res;

endmodule
