// fp64_mul: pipelined IEEE-754 binary64 multiplier, the element of the PLF
// multiplier arrays.
// Stage 1 unpacks both operands, forms the 106-bit significand product and
// the unbiased exponent sum. Stage 2 normalises the product, rounds it to
// nearest-even and packs the result.
// Interface: operands a, b; result y appears two cycles with en=1 later.
// en is a pipeline advance enable used by the enclosing datapath to stall.
// Design choices (the source describes only double-precision multipliers):
// subnormal operands are read as zero and results below the normal range are
// flushed to signed zero; overflow gives infinity; NaN or inf*0 gives the
// default quiet NaN; an infinite operand otherwise gives a signed infinity.
module fp64_mul (
  input  logic        clk,
  input  logic        en,
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic [63:0] y
);

  // ---------------- stage 1 ----------------
  logic         s1_sign;
  logic [12:0]  s1_exp;      // signed-ish: biased sum, offset by 1023 later
  logic [105:0] s1_prod;
  logic         s1_zero, s1_inf, s1_nan;

  logic        sa, sb;
  logic [10:0] ea, eb;
  logic [52:0] ma, mb;
  logic        za, zb, ia, ib, na, nb;

  always_comb begin
    sa = a[63]; sb = b[63];
    ea = a[62:52]; eb = b[62:52];
    za = (ea == 11'd0);
    zb = (eb == 11'd0);
    ia = (ea == 11'h7ff) && (a[51:0] == 52'd0);
    ib = (eb == 11'h7ff) && (b[51:0] == 52'd0);
    na = (ea == 11'h7ff) && (a[51:0] != 52'd0);
    nb = (eb == 11'h7ff) && (b[51:0] != 52'd0);
    ma = {1'b1, a[51:0]};
    mb = {1'b1, b[51:0]};
  end

  always_ff @(posedge clk) begin
    if (en) begin
      s1_sign <= sa ^ sb;
      s1_exp  <= 13'({2'b00, ea}) + 13'({2'b00, eb});
      s1_prod <= ma * mb;
      s1_nan  <= na || nb || (ia && zb) || (ib && za);
      s1_inf  <= ia || ib;
      s1_zero <= za || zb;
    end
  end

  // ---------------- stage 2 ----------------
  logic [52:0]  mant;
  logic         guard, sticky, rnd;
  logic [53:0]  mant_r;
  logic signed [14:0] e_norm;
  logic [63:0]  res;

  always_comb begin
    // Product is in [1,4): bit 105 set means [2,4).
    if (s1_prod[105]) begin
      mant   = s1_prod[105:53];
      guard  = s1_prod[52];
      sticky = |s1_prod[51:0];
      e_norm = 15'(signed'({2'b00, s1_exp})) - 15'sd1023 + 15'sd1;
    end else begin
      mant   = s1_prod[104:52];
      guard  = s1_prod[51];
      sticky = |s1_prod[50:0];
      e_norm = 15'(signed'({2'b00, s1_exp})) - 15'sd1023;
    end
    rnd    = guard && (sticky || mant[0]);
    mant_r = {1'b0, mant} + 54'(rnd);
    if (mant_r[53]) begin
      mant_r = mant_r >> 1;
      e_norm = e_norm + 15'sd1;
    end
    if (s1_nan)
      res = 64'h7ff8_0000_0000_0000;
    else if (s1_inf)
      res = {s1_sign, 11'h7ff, 52'd0};
    else if (s1_zero || e_norm <= 0)
      res = {s1_sign, 63'd0};
    else if (e_norm >= 15'sd2047)
      res = {s1_sign, 11'h7ff, 52'd0};
    else
      res = {s1_sign, e_norm[10:0], mant_r[51:0]};
  end

  always_ff @(posedge clk) begin
    if (en) y <= res;
  end

endmodule
