// fp_add: IEEE-754 single-precision floating-point adder (combinational).
//
// The PE of the array has one 32-bit single-precision adder next to its
// multiplier; this is that adder. It computes y = a + b in one combinational
// pass: operands are ordered by magnitude, the smaller significand is
// aligned with guard/round/sticky bits, added or subtracted, normalised with
// a leading-zero count and rounded to nearest, ties to even.
//
// Choices of this design (the operand format is the only given): subnormal
// inputs are read as zero and subnormal results are flushed to a signed
// zero; overflow gives infinity; NaN operands and inf - inf give the quiet
// NaN 7FC00000. An exact zero sum of operands of opposite sign is +0.
//
// Interface: a, b, y are 32-bit IEEE-754 words. No clock; the PE registers
// the result at the end of its cycle.
module fp_add (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  logic        sa, sb, sl, ss;
  logic [7:0]  ea, eb, el, es;
  logic [22:0] fa, fb;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic        swap;
  logic [23:0] ml, ms;
  logic [7:0]  d;
  logic [26:0] ml_x, ms_x, ms_sh;
  logic        sticky_al;
  logic [27:0] sum;
  logic [26:0] nrm;
  logic [4:0]  lzc;
  logic signed [9:0] e_n, e_r;
  logic        g, r, s, lsb, rnd_up;
  logic [24:0] mant_r;
  logic        eff_sub;

  always_comb begin
    sa = a[31]; ea = a[30:23]; fa = a[22:0];
    sb = b[31]; eb = b[30:23]; fb = b[22:0];
    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    a_inf  = (ea == 8'hFF) && (fa == 23'd0);
    b_inf  = (eb == 8'hFF) && (fb == 23'd0);
    a_nan  = (ea == 8'hFF) && (fa != 23'd0);
    b_nan  = (eb == 8'hFF) && (fb != 23'd0);

    // order by magnitude: l is the larger operand
    swap = {eb, fb} > {ea, fa};
    sl = swap ? sb : sa;  el = swap ? eb : ea;  ml = {1'b1, swap ? fb : fa};
    ss = swap ? sa : sb;  es = swap ? ea : eb;  ms = {1'b1, swap ? fa : fb};
    eff_sub = sl ^ ss;

    // align the smaller significand, keeping a sticky bit
    d    = el - es;
    ml_x = {ml, 3'b000};
    ms_x = {ms, 3'b000};
    if (d >= 8'd27) begin
      ms_sh     = 27'd0;
      sticky_al = 1'b1;
    end else begin
      ms_sh     = ms_x >> d;
      sticky_al = |(ms_x & ~(27'h7FF_FFFF << d));
    end
    ms_sh[0] = ms_sh[0] | sticky_al;

    sum = eff_sub ? ({1'b0, ml_x} - {1'b0, ms_sh}) : ({1'b0, ml_x} + {1'b0, ms_sh});

    // normalise
    lzc = 5'd0;
    for (int i = 26; i >= 0; i--) begin
      if (sum[i]) begin
        lzc = 5'(26 - i);
        break;
      end
    end
    if (sum[27]) begin
      nrm = {sum[27:2], sum[1] | sum[0]};
      e_n = $signed({2'b00, el}) + 10'sd1;
    end else begin
      nrm = sum[26:0] << lzc;
      e_n = $signed({2'b00, el}) - $signed({5'd0, lzc});
    end

    // round to nearest, ties to even
    lsb    = nrm[3];
    g      = nrm[2];
    r      = nrm[1];
    s      = nrm[0];
    rnd_up = g && (r || s || lsb);
    mant_r = {1'b0, nrm[26:3]} + {24'd0, rnd_up};
    e_r    = e_n;
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      e_r    = e_n + 10'sd1;
    end

    // result selection
    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb))) begin
      y = 32'h7FC0_0000;
    end else if (a_inf) begin
      y = {sa, 8'hFF, 23'd0};
    end else if (b_inf) begin
      y = {sb, 8'hFF, 23'd0};
    end else if (a_zero && b_zero) begin
      y = {sa & sb, 31'd0};
    end else if (a_zero) begin
      y = b;
    end else if (b_zero) begin
      y = a;
    end else if (sum == 28'd0) begin
      y = 32'd0;
    end else if (e_r >= 10'sd255) begin
      y = {sl, 8'hFF, 23'd0};
    end else if (e_r <= 10'sd0) begin
      y = {sl, 31'd0};
    end else begin
      y = {sl, e_r[7:0], mant_r[22:0]};
    end
  end

endmodule
