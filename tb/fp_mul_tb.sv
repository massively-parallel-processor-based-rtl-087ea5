// fp_mul_tb: self-checking test of the single-precision multiplier.
//
// Compares fp_mul with the reference in fp_ref_pkg on directed cases
// (exact products, signed zeros, ties, rounding into the next binade,
// overflow, underflow, infinities, NaN) and on random operands over the
// full exponent range.
module fp_mul_tb;
  import fp_ref_pkg::*;

  logic        clk = 1'b0;
  logic [31:0] a, b, y, exp_y;
  int          checks = 0, failures = 0;

  fp_mul dut (.a(a), .b(b), .y(y));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] ta, logic [31:0] tb_);
    a = ta; b = tb_;
    @(posedge clk);
    exp_y = ref_mul(ta, tb_);
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h, expected %h", ta, tb_, y, exp_y);
    end
  endtask

  initial begin
    check(sp_of(3.0), sp_of(-7.0));
    check(sp_of(0.5), sp_of(0.25));
    check(32'h8000_0000, sp_of(2.0));               // -0 * 2 = -0
    check(32'h3FFF_FFFF, 32'h3FFF_FFFF);            // rounds into next binade
    check(32'h3F80_0001, 32'h3F80_0001);
    check(32'h3FC0_0001, 32'h3FC0_0001);
    check(32'h3F80_0800, 32'h3F80_0800);            // exact tie, even -> down
    check(32'h7F00_0000, 32'h4000_0000);            // overflow -> inf
    check(32'h0080_0000, 32'h3F00_0000);            // underflow -> 0
    check(32'h7F80_0000, 32'h0000_0000);            // inf * 0 -> NaN
    check(32'h7F80_0000, sp_of(-2.0));              // -inf
    check(32'hFFC0_0000, sp_of(1.0));               // NaN
    check(32'h0000_0001, sp_of(1.0));               // subnormal read as zero
    repeat (30000) check(rand_sp(1, 254), rand_sp(1, 254));
    repeat (10000) check(rand_sp(110, 144), rand_sp(110, 144));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
