// pe_alu: the three-input ALU of a processing element.
//
// Computes, in one combinational pass, one of
//   OP_MAC  : y = a + b*c
//   OP_AMUL : y = (a + b)*c
//   OP_PASS : y = c (bit-exact move)
// The two arithmetic forms are the ones the fractional step method uses most
// (summing the terms of the stencil x_new = A + B x + C x_E + ...). For
// OP_MAC the multiplier feeds the adder, for OP_AMUL the adder feeds the
// multiplier. Each step rounds separately (not fused).
// OP_PASS is this design's own addition so that data can be moved through
// the array without any arithmetic rounding or sign-of-zero change.
//
// The published PE has one adder and one multiplier. Sharing them
// between the two orders would put a (never sensitised) combinational loop
// adder -> multiplier -> adder through the operand multiplexers, so this
// design gives each order its own adder/multiplier chain and selects the
// result; only one chain's result is used in any cycle.
//
// Interface: op (sca_pkg::alu_op_e), a/b/c/y 32-bit IEEE-754 words.
// Ops other than the three above give y = 0 (they write nothing in the PE).
module pe_alu
  import sca_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [31:0] c,
  output logic [31:0] y
);

  logic [31:0] mac_prod, mac_sum, amul_sum, amul_prod;

  // a + b*c
  fp_mul u_mac_mul  (.a(b),        .b(c), .y(mac_prod));
  fp_add u_mac_add  (.a(a),        .b(mac_prod), .y(mac_sum));
  // (a + b)*c
  fp_add u_amul_add (.a(a),        .b(b), .y(amul_sum));
  fp_mul u_amul_mul (.a(amul_sum), .b(c), .y(amul_prod));

  always_comb begin
    unique case (op)
      OP_MAC:  y = mac_sum;
      OP_AMUL: y = amul_prod;
      OP_PASS: y = c;
      default: y = 32'd0;
    endcase
  end

endmodule
