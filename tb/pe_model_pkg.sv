// pe_model_pkg: instruction-level reference model of one PE, for the
// testbenches. One call of pe_step applies one broadcast instruction to a
// PE state (register file, accumulator, four communication registers)
// given the four neighbour values, using the reference arithmetic of
// fp_ref_pkg.
package pe_model_pkg;
  import sca_pkg::*;
  import fp_ref_pkg::*;

  localparam int M_RF = 32;

  typedef struct {
    word_t rf [M_RF];
    word_t acc;
    word_t n, s, w, e;
  } pe_state_t;

  function automatic word_t m_sel(src_e src, rf_addr_t ad, pe_state_t st,
                                  word_t n_in, word_t s_in, word_t w_in, word_t e_in);
    case (src)
      SRC_RF:   return st.rf[ad];
      SRC_N:    return n_in;
      SRC_S:    return s_in;
      SRC_W:    return w_in;
      SRC_E:    return e_in;
      SRC_ACC:  return st.acc;
      SRC_ZERO: return 32'h0000_0000;
      default:  return 32'h3F80_0000;
    endcase
  endfunction

  function automatic void pe_step(ref pe_state_t st, input instr_t i,
                                  input word_t n_in, input word_t s_in,
                                  input word_t w_in, input word_t e_in);
    word_t a, b, c, r;
    a = m_sel(i.src_a, i.addr_a, st, n_in, s_in, w_in, e_in);
    b = m_sel(i.src_b, i.addr_b, st, n_in, s_in, w_in, e_in);
    c = m_sel(i.src_c, i.addr_c, st, n_in, s_in, w_in, e_in);
    case (i.op)
      OP_MAC:  r = ref_add(a, ref_mul(b, c));
      OP_AMUL: r = ref_mul(ref_add(a, b), c);
      OP_PASS: r = c;
      default: return;
    endcase
    if (i.wr_rf)  st.rf[i.addr_d] = r;
    if (i.wr_acc) st.acc = r;
    if (i.wr_n)   st.n = r;
    if (i.wr_s)   st.s = r;
    if (i.wr_w)   st.w = r;
    if (i.wr_e)   st.e = r;
  endfunction

  function automatic instr_t rand_instr();
    instr_t i;
    i = instr_t'({$urandom, $urandom});
    case ($urandom_range(3))
      0: i.op = OP_MAC;
      1: i.op = OP_AMUL;
      2: i.op = OP_PASS;
      default: i.op = OP_NOP;
    endcase
    return i;
  endfunction

  function automatic instr_t pass_to_rf(src_e src, rf_addr_t ad);
    instr_t i;
    i = '{op: OP_PASS, src_a: SRC_ZERO, src_b: SRC_ZERO, src_c: src, default: '0};
    i.addr_d = ad;
    i.wr_rf  = 1'b1;
    return i;
  endfunction

endpackage
