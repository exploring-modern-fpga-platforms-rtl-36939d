// fp64_add: pipelined IEEE-754 binary64 adder, the element of the PLF
// logarithmic adder trees.
// Stage 1 orders the operands by magnitude, aligns the smaller significand
// to the larger exponent and keeps three extra bits (guard, round and a
// sticky OR of everything shifted out). Stage 2 adds or subtracts the
// significands, renormalises with a leading-one search, rounds to
// nearest-even and packs.
// Interface: operands a, b; result y = a + b appears two cycles with en=1
// later. en is a pipeline advance enable used for stalling.
// Design choices (the source only names adder trees): subnormal operands are
// read as zero, results below the normal range flush to zero, overflow gives
// infinity, inf + (-inf) and NaN operands give the default quiet NaN, and an
// exact cancellation gives +0.
module fp64_add (
  input  logic        clk,
  input  logic        en,
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic [63:0] y
);

  // ---------------- stage 1: order and align ----------------
  logic        xs, ys;          // sign of larger / smaller magnitude
  logic [10:0] xe, ye;
  logic [52:0] xm, ym;
  logic [10:0] d;
  logic [55:0] yal;
  logic [55:0] yfull;
  logic        stk;
  logic        a_big;
  logic [10:0] ea, eb;
  logic [52:0] ma, mb;
  logic        spec_nan, spec_inf;
  logic [63:0] spec_val;

  always_comb begin
    ea = a[62:52];
    eb = b[62:52];
    ma = (ea == 11'd0) ? 53'd0 : {1'b1, a[51:0]};
    mb = (eb == 11'd0) ? 53'd0 : {1'b1, b[51:0]};
    a_big = {ea, ma} >= {eb, mb};
    if (a_big) begin
      xs = a[63]; xe = ea; xm = ma; ys = b[63]; ye = eb; ym = mb;
    end else begin
      xs = b[63]; xe = eb; xm = mb; ys = a[63]; ye = ea; ym = ma;
    end
    d     = xe - ye;
    yfull = {ym, 3'b000};
    if (d >= 11'd56) begin
      yal = 56'd0;
      stk = |ym;
    end else begin
      yal = yfull >> d;
      stk = |(yfull & ((56'd1 << d) - 56'd1));
    end
    yal[0] = yal[0] | stk;

    spec_nan = ((ea == 11'h7ff) && (a[51:0] != 0)) ||
               ((eb == 11'h7ff) && (b[51:0] != 0)) ||
               ((ea == 11'h7ff) && (eb == 11'h7ff) && (a[63] != b[63]));
    spec_inf = (ea == 11'h7ff) || (eb == 11'h7ff);
    spec_val = spec_nan ? 64'h7ff8_0000_0000_0000 :
               ((ea == 11'h7ff) ? {a[63], 11'h7ff, 52'd0} : {b[63], 11'h7ff, 52'd0});
  end

  logic        s1_sign, s1_sub, s1_spec;
  logic [10:0] s1_exp;
  logic [55:0] s1_x, s1_y;
  logic [63:0] s1_spec_val;

  always_ff @(posedge clk) begin
    if (en) begin
      s1_sign     <= xs;
      s1_sub      <= xs ^ ys;
      s1_exp      <= xe;
      s1_x        <= {xm, 3'b000};
      s1_y        <= yal;
      s1_spec     <= spec_inf;
      s1_spec_val <= spec_val;
    end
  end

  // ---------------- stage 2: add, normalise, round ----------------
  logic [56:0] sum;
  logic [55:0] nrm;
  logic signed [13:0] e_n;
  logic [5:0]  lz;
  logic        found;
  logic [52:0] mant;
  logic [53:0] mant_r;
  logic        rnd;
  logic [63:0] res;

  always_comb begin
    sum = s1_sub ? ({1'b0, s1_x} - {1'b0, s1_y}) : ({1'b0, s1_x} + {1'b0, s1_y});
    e_n = 14'(signed'({3'b000, s1_exp}));
    lz = 6'd0;
    found = 1'b0;
    if (sum[56]) begin
      nrm = {sum[56:2], sum[1] | sum[0]};
      e_n = e_n + 14'sd1;
    end else begin
      for (int i = 55; i >= 0; i--) begin
        if (!found && sum[i]) begin
          found = 1'b1;
          lz = 6'(55 - i);
        end
      end
      nrm = sum[55:0] << lz;
      e_n = e_n - 14'(lz);
    end
    mant   = nrm[55:3];
    rnd    = nrm[2] && (nrm[1] || nrm[0] || mant[0]);
    mant_r = {1'b0, mant} + 54'(rnd);
    if (mant_r[53]) begin
      mant_r = mant_r >> 1;
      e_n = e_n + 14'sd1;
    end
    if (s1_spec)
      res = s1_spec_val;
    else if (sum == 57'd0)
      res = (s1_sub) ? 64'd0 : {s1_sign, 63'd0};
    else if (e_n <= 0)
      res = {s1_sign, 63'd0};
    else if (e_n >= 14'sd2047)
      res = {s1_sign, 11'h7ff, 52'd0};
    else
      res = {s1_sign, e_n[10:0], mant_r[51:0]};
  end

  always_ff @(posedge clk) begin
    if (en) y <= res;
  end

endmodule
