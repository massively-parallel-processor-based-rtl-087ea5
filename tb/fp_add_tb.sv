// fp_add_tb: self-checking test of the single-precision adder.
//
// Compares fp_add with the reference in fp_ref_pkg on directed cases
// (exact cancellation, signed zeros, ties, carries into the exponent,
// large exponent differences, overflow, infinities, NaN) and on random
// operands over the full exponent range, with a bias towards close
// exponents so that subtraction cancels many bits.
module fp_add_tb;
  import fp_ref_pkg::*;

  logic        clk = 1'b0;
  logic [31:0] a, b, y, exp_y;
  int          checks = 0, failures = 0;

  fp_add dut (.a(a), .b(b), .y(y));

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
    exp_y = ref_add(ta, tb_);
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h = %h, expected %h", ta, tb_, y, exp_y);
    end
  endtask

  initial begin
    // directed
    check(sp_of(1.0), sp_of(2.0));
    check(sp_of(1.5), sp_of(-1.5));                 // exact zero -> +0
    check(32'h8000_0000, 32'h8000_0000);            // -0 + -0 = -0
    check(32'h0000_0000, 32'h8000_0000);            // +0 + -0 = +0
    check(sp_of(3.25), 32'h0000_0000);
    check(32'h3F80_0000, 32'h3380_0000);            // 1 + 2^-24: tie, even -> 1
    check(32'h3F80_0001, 32'h3380_0000);            // tie, odd -> up
    check(32'h3FFF_FFFF, 32'h3400_0000);            // carry into exponent
    check(32'h3F80_0000, 32'hB380_0001);            // 1 - just over half ulp
    check(32'h4B80_0000, 32'h3F80_0000);            // 2^24 + 1
    check(32'h7F7F_FFFF, 32'h7F7F_FFFF);            // overflow -> inf
    check(32'h7F80_0000, sp_of(5.0));
    check(32'h7F80_0000, 32'hFF80_0000);            // inf - inf -> NaN
    check(32'h7FC0_0000, sp_of(1.0));
    check(32'h0080_0000, 32'h8080_0001);            // cancels below normal -> 0
    check(32'h0000_0001, sp_of(2.0));               // subnormal read as zero
    check(sp_of(1.0), 32'h2F80_0000);               // far below: d = 32
    // random, full range
    repeat (20000) check(rand_sp(1, 254), rand_sp(1, 254));
    // random, close exponents (cancellation)
    repeat (20000) begin
      logic [31:0] x, z;
      x = rand_sp(100, 160);
      z = {~x[31], 8'(int'(x[30:23]) - int'($urandom_range(2))), 23'($urandom)};
      check(x, z);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
