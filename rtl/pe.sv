// pe: one processing element of the systolic computational-memory array.
//
// Structure (one instance per grid point, or per block of grid points):
//   * four communication registers N, S, W, E. Whatever the PE writes into
//     its N-register is read by the neighbour to the north, and so on; the
//     neighbours may read them in any later cycle.
//   * an operand multiplexer that gives each ALU input (a, b, c) one of:
//     a register-file word, a neighbour's facing communication register
//     (north neighbour's S, south's N, west's E, east's W), the accumulator,
//     or the constants 0.0 and 1.0.
//   * the three-input ALU (a+b*c or (a+b)*c, pe_alu).
//   * the accumulator Acc, used to sum the terms of
//     x_new = A + B x + C x_E + D x_W + E x_N + F x_S one per cycle.
//   * the register file (pe_regfile), the PE's share of the distributed
//     memory.
// The block diagram (these parts and their names) follows the processor's
// published figure. Connecting Acc to any ALU input rather than to input a
// only, the constant sources and the single-cycle execution are this
// design's choices.
//
// Timing: every PE executes the broadcast instruction in the cycle it is
// presented; all results (Acc, one register-file word, any subset of the
// four communication registers) are written at the next rising clock edge,
// so a neighbour sees a new communication-register value one cycle after
// the instruction that wrote it. OP_NOP and OP_HALT write nothing.
// Reset (rst_n low, synchronous) clears Acc and the communication registers.
module pe
  import sca_pkg::*;
#(
  parameter int unsigned RF_DEPTH = 32
) (
  input  logic   clk,
  input  logic   rst_n,
  input  instr_t instr,
  // facing communication registers of the four neighbours
  input  word_t  n_in,     // north neighbour's S-register
  input  word_t  s_in,     // south neighbour's N-register
  input  word_t  w_in,     // west neighbour's E-register
  input  word_t  e_in,     // east neighbour's W-register
  // own communication registers
  output word_t  n_reg,
  output word_t  s_reg,
  output word_t  w_reg,
  output word_t  e_reg,
  output word_t  acc
);

  word_t rf_a, rf_b, rf_c;
  word_t opa, opb, opc, result;
  logic  writes;

  pe_regfile #(.DEPTH(RF_DEPTH), .AW(RF_AW), .W(WORD_W)) u_rf (
    .clk    (clk),
    .we     (writes && instr.wr_rf),
    .waddr  (instr.addr_d),
    .wdata  (result),
    .raddr_a(instr.addr_a),
    .raddr_b(instr.addr_b),
    .raddr_c(instr.addr_c),
    .rdata_a(rf_a),
    .rdata_b(rf_b),
    .rdata_c(rf_c)
  );

  function automatic word_t sel(src_e s, word_t rf);
    unique case (s)
      SRC_RF:   return rf;
      SRC_N:    return n_in;
      SRC_S:    return s_in;
      SRC_W:    return w_in;
      SRC_E:    return e_in;
      SRC_ACC:  return acc;
      SRC_ZERO: return FP_ZERO;
      SRC_ONE:  return FP_ONE;
      default:  return FP_ZERO;
    endcase
  endfunction

  always_comb begin
    opa = sel(instr.src_a, rf_a);
    opb = sel(instr.src_b, rf_b);
    opc = sel(instr.src_c, rf_c);
    writes = (instr.op == OP_MAC) || (instr.op == OP_AMUL) || (instr.op == OP_PASS);
  end

  pe_alu u_alu (.op(instr.op), .a(opa), .b(opb), .c(opc), .y(result));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc   <= FP_ZERO;
      n_reg <= FP_ZERO;
      s_reg <= FP_ZERO;
      w_reg <= FP_ZERO;
      e_reg <= FP_ZERO;
    end else if (writes) begin
      if (instr.wr_acc) acc   <= result;
      if (instr.wr_n)   n_reg <= result;
      if (instr.wr_s)   s_reg <= result;
      if (instr.wr_w)   w_reg <= result;
      if (instr.wr_e)   e_reg <= result;
    end
  end

endmodule
