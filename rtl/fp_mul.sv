// fp_mul: IEEE-754 single-precision floating-point multiplier (combinational).
//
// The PE of the array has one 32-bit single-precision multiplier next to its
// adder; this is that multiplier. It forms the 48-bit product of the two
// 24-bit significands, normalises it by at most one place, and rounds to
// nearest, ties to even.
//
// Choices of this design (the operand format is the only given): subnormal
// inputs are read as zero and results below the normal range are flushed to
// a signed zero; overflow gives infinity; a NaN operand or inf * 0 gives the
// quiet NaN 7FC00000.
//
// Interface: a, b, y are 32-bit IEEE-754 words. No clock.
module fp_mul (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  logic        sy;
  logic [7:0]  ea, eb;
  logic [22:0] fa, fb;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [47:0] p;
  logic [22:0] mant;
  logic        g, s, rnd_up;
  logic [23:0] mant_r;
  logic signed [10:0] e_p, e_r;

  always_comb begin
    sy = a[31] ^ b[31];
    ea = a[30:23]; fa = a[22:0];
    eb = b[30:23]; fb = b[22:0];
    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    a_inf  = (ea == 8'hFF) && (fa == 23'd0);
    b_inf  = (eb == 8'hFF) && (fb == 23'd0);
    a_nan  = (ea == 8'hFF) && (fa != 23'd0);
    b_nan  = (eb == 8'hFF) && (fb != 23'd0);

    p   = {24'd0, 1'b1, fa} * {24'd0, 1'b1, fb};
    e_p = $signed({3'b000, ea}) + $signed({3'b000, eb}) - 11'sd127;
    if (p[47]) begin
      mant = p[46:24];
      g    = p[23];
      s    = |p[22:0];
      e_p  = e_p + 11'sd1;
    end else begin
      mant = p[45:23];
      g    = p[22];
      s    = |p[21:0];
    end
    rnd_up = g && (s || mant[0]);
    mant_r = {1'b0, mant} + {23'd0, rnd_up};
    e_r    = e_p;
    if (mant_r[23]) begin
      e_r = e_p + 11'sd1;   // 1.11..1 rounded up to 10.0: fraction becomes 0
    end

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero)) begin
      y = 32'h7FC0_0000;
    end else if (a_inf || b_inf) begin
      y = {sy, 8'hFF, 23'd0};
    end else if (a_zero || b_zero) begin
      y = {sy, 31'd0};
    end else if (e_r >= 11'sd255) begin
      y = {sy, 8'hFF, 23'd0};
    end else if (e_r <= 11'sd0) begin
      y = {sy, 31'd0};
    end else begin
      y = {sy, e_r[7:0], mant_r[22:0]};
    end
  end

endmodule
