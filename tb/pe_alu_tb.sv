// pe_alu_tb: self-checking test of the PE's three-input ALU.
//
// For random operands and every operation, compares the ALU with
// a + b*c and (a + b)*c built from the reference arithmetic of fp_ref_pkg
// (each step rounded on its own), with a bit-exact PASS of c, and with a
// zero result for NOP and HALT.
module pe_alu_tb;
  import sca_pkg::*;
  import fp_ref_pkg::*;

  logic        clk = 1'b0;
  alu_op_e     op;
  logic [31:0] a, b, c, y, exp_y;
  int          checks = 0, failures = 0;

  pe_alu dut (.op(op), .a(a), .b(b), .c(c), .y(y));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] model(alu_op_e o, logic [31:0] x, logic [31:0] p, logic [31:0] q);
    case (o)
      OP_MAC:  return ref_add(x, ref_mul(p, q));
      OP_AMUL: return ref_mul(ref_add(x, p), q);
      OP_PASS: return q;
      default: return 32'd0;
    endcase
  endfunction

  task automatic check(alu_op_e o, logic [31:0] x, logic [31:0] p, logic [31:0] q);
    op = o; a = x; b = p; c = q;
    @(posedge clk);
    exp_y = model(o, x, p, q);
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL op=%s a=%h b=%h c=%h y=%h expected %h",
                                  o.name(), x, p, q, y, exp_y);
    end
  endtask

  initial begin
    // 1 + 2*3 = 7 and (1 + 2)*3 = 9
    check(OP_MAC,  sp_of(1.0), sp_of(2.0), sp_of(3.0));
    check(OP_AMUL, sp_of(1.0), sp_of(2.0), sp_of(3.0));
    check(OP_PASS, sp_of(1.0), sp_of(2.0), 32'h8000_0000);
    check(OP_NOP,  sp_of(1.0), sp_of(2.0), sp_of(3.0));
    check(OP_HALT, sp_of(1.0), sp_of(2.0), sp_of(3.0));
    repeat (20000) begin
      alu_op_e o;
      case ($urandom_range(3))
        0: o = OP_MAC;
        1: o = OP_AMUL;
        2: o = OP_PASS;
        default: o = OP_NOP;
      endcase
      check(o, rand_sp(100, 154), rand_sp(100, 154), rand_sp(100, 154));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
