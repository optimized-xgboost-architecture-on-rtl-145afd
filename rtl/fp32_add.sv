// fp32_add: combinational IEEE-754 single-precision adder.
//
// Used to accumulate the leaf values of all trees into one prediction. The
// operands are ordered by magnitude, the smaller one is aligned with guard,
// round and sticky bits, the significands are added or subtracted, the result
// is normalised and rounded to nearest, ties to even. Infinities and NaNs are
// propagated (inf + -inf gives the quiet NaN 0x7FC00000). Subnormal inputs
// are read as zero and results below the normal range are flushed to a
// signed zero; this simplification, and the rounding mode, are choices of
// this design. An exact zero difference is +0. Purely combinational.
module fp32_add
  import xgb_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);
  localparam fp32_t QNAN = 32'h7FC0_0000;

  logic        sa, sb, sl, ss;
  logic [7:0]  ea, eb, el, es;
  logic [23:0] ml, ms;
  logic        a_inf, b_inf, a_nan, b_nan, a_zero, b_zero;
  logic [7:0]  d;
  logic [26:0] al_l, al_s;      // 24-bit significand + guard, round, sticky
  logic [27:0] sum;             // one carry bit on top
  logic [26:0] norm;
  logic [4:0]  lz;
  logic signed [9:0] e_res;
  logic [24:0] rnd;             // rounded significand with carry
  logic        inc;
  fp32_t       res;

  // position of the leading one in a 27-bit vector, as a left-shift amount
  function automatic logic [4:0] lzc27(input logic [26:0] v);
    logic [4:0] n;
    n = 5'd27;
    for (int i = 0; i <= 26; i++)
      if (v[i]) n = 5'(26 - i);
    return n;
  endfunction

  always_comb begin
    sa = a[31]; ea = a[30:23];
    sb = b[31]; eb = b[30:23];
    a_nan  = (ea == 8'hFF) && (a[22:0] != '0);
    b_nan  = (eb == 8'hFF) && (b[22:0] != '0);
    a_inf  = (ea == 8'hFF) && (a[22:0] == '0);
    b_inf  = (eb == 8'hFF) && (b[22:0] == '0);
    a_zero = (ea == 8'h00);   // zero or subnormal, read as zero
    b_zero = (eb == 8'h00);

    // order by magnitude: l is the larger operand
    if (a[30:0] >= b[30:0]) begin
      sl = sa; el = ea; ml = {~a_zero, a[22:0]};
      ss = sb; es = eb; ms = {~b_zero, b[22:0]};
      if (b_zero) ms = '0;
    end else begin
      sl = sb; el = eb; ml = {~b_zero, b[22:0]};
      ss = sa; es = ea; ms = {~a_zero, a[22:0]};
      if (a_zero) ms = '0;
    end

    // align the smaller operand; shifted-out bits collapse into sticky
    d    = (ms == '0) ? 8'd0 : el - es;
    al_l = {ml, 3'b000};
    al_s = {ms, 3'b000};
    if (d >= 8'd27)
      al_s = {26'd0, (ms != '0)};
    else if (d != 0)
      al_s = (al_s >> d) | {26'd0, ((al_s & ((27'd1 << d) - 27'd1)) != '0)};

    // add or subtract significands
    if (sl == ss) sum = {1'b0, al_l} + {1'b0, al_s};
    else          sum = {1'b0, al_l} - {1'b0, al_s};

    // normalise
    e_res = signed'({2'b00, el});
    lz    = 5'd0;
    if (sum[27]) begin
      norm  = sum[27:1] | {26'd0, sum[0]};
      e_res = e_res + 10'sd1;
    end else begin
      lz    = lzc27(sum[26:0]);
      norm  = sum[26:0] << lz;
      e_res = e_res - signed'({5'd0, lz});
    end

    // round to nearest, ties to even
    inc = norm[2] & (norm[1] | norm[0] | norm[3]);
    rnd = {1'b0, norm[26:3]} + {24'd0, inc};
    if (rnd[24]) begin
      rnd   = rnd >> 1;
      e_res = e_res + 10'sd1;
    end

    // pack
    if (sum[26:0] == '0 && !sum[27])
      res = {((sl & ss) & (sl == ss)), 31'd0};   // exact zero: +0 unless both -0
    else if (e_res >= 10'sd255)
      res = {sl, 8'hFF, 23'd0};
    else if (e_res <= 10'sd0)
      res = {sl, 31'd0};
    else
      res = {sl, e_res[7:0], rnd[22:0]};

    // special operands
    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb)))
      y = QNAN;
    else if (a_inf)
      y = a;
    else if (b_inf)
      y = b;
    else if (a_zero && b_zero)
      y = {sa & sb, 31'd0};
    else
      y = res;
  end
endmodule
