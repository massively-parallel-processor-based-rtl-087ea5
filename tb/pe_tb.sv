// pe_tb: self-checking test of one processing element.
//
// Resets the PE and checks that Acc and the communication registers are
// zero, fills the register file from the west input with PASS, then runs a
// long random instruction stream (random operation, operand sources,
// register-file addresses and write masks) against the neighbour inputs,
// comparing Acc, the four communication registers and, through PASS reads,
// the register file with the instruction-level model of pe_model_pkg after
// every cycle. Counts that every operand source and every destination was
// exercised.
module pe_tb;
  import sca_pkg::*;
  import fp_ref_pkg::*;
  import pe_model_pkg::*;

  logic      clk = 1'b0, rst_n;
  instr_t    instr;
  word_t     n_in, s_in, w_in, e_in, n_reg, s_reg, w_reg, e_reg, acc;
  pe_state_t m;
  int        checks = 0, failures = 0;
  int        src_seen [8];

  pe #(.RF_DEPTH(32)) dut (
    .clk(clk), .rst_n(rst_n), .instr(instr),
    .n_in(n_in), .s_in(s_in), .w_in(w_in), .e_in(e_in),
    .n_reg(n_reg), .s_reg(s_reg), .w_reg(w_reg), .e_reg(e_reg), .acc(acc)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(word_t got, word_t want, string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h expected %h at %0t", what, got, want, $time);
    end
  endtask

  task automatic compare_all();
    cmp(acc, m.acc, "acc");
    cmp(n_reg, m.n, "N-reg");
    cmp(s_reg, m.s, "S-reg");
    cmp(w_reg, m.w, "W-reg");
    cmp(e_reg, m.e, "E-reg");
  endtask

  // apply one instruction to both the PE and the model
  task automatic step(instr_t i);
    @(negedge clk);
    instr = i;
    n_in = rand_sp(110, 144); s_in = rand_sp(110, 144);
    w_in = rand_sp(110, 144); e_in = rand_sp(110, 144);
    pe_step(m, i, n_in, s_in, w_in, e_in);
    src_seen[i.src_a]++; src_seen[i.src_b]++; src_seen[i.src_c]++;
    @(posedge clk);
    #1 compare_all();
  endtask

  initial begin
    rst_n = 1'b0;
    instr = '{op: OP_NOP, src_a: SRC_ZERO, src_b: SRC_ZERO, src_c: SRC_ZERO, default: '0};
    n_in = '0; s_in = '0; w_in = '0; e_in = '0;
    m.acc = '0; m.n = '0; m.s = '0; m.w = '0; m.e = '0;
    repeat (3) @(posedge clk);
    #1 compare_all();
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < 32; k++) step(pass_to_rf(SRC_W, rf_addr_t'(k)));
    // directed: Acc = 1 + 2*3, then (Acc + 1)*2 into all four registers
    begin
      instr_t i;
      m.rf[0] = sp_of(1.0); m.rf[1] = sp_of(2.0); m.rf[2] = sp_of(3.0);
      @(negedge clk);
      for (int k = 0; k < 3; k++) begin
        instr = pass_to_rf(SRC_N, rf_addr_t'(k));
        n_in = m.rf[k];
        @(negedge clk);
      end
      i = '{op: OP_MAC, src_a: SRC_RF, src_b: SRC_RF, src_c: SRC_RF, default: '0};
      i.addr_a = 0; i.addr_b = 1; i.addr_c = 2; i.wr_acc = 1'b1;
      instr = i;
      @(negedge clk);
      cmp(acc, sp_of(7.0), "1 + 2*3");
      i = '{op: OP_AMUL, src_a: SRC_ACC, src_b: SRC_ONE, src_c: SRC_RF, default: '0};
      i.addr_c = 1; i.wr_n = 1; i.wr_s = 1; i.wr_w = 1; i.wr_e = 1;
      instr = i;
      @(negedge clk);
      cmp(n_reg, sp_of(16.0), "(7 + 1)*2 N");
      cmp(e_reg, sp_of(16.0), "(7 + 1)*2 E");
      m.acc = acc; m.n = n_reg; m.s = s_reg; m.w = w_reg; m.e = e_reg;
    end
    repeat (20000) step(rand_instr());
    // read the whole register file back through PASS into the E-register
    for (int k = 0; k < 32; k++) begin
      instr_t i;
      i = '{op: OP_PASS, src_a: SRC_ZERO, src_b: SRC_ZERO, src_c: SRC_RF, default: '0};
      i.addr_c = rf_addr_t'(k); i.wr_e = 1'b1;
      step(i);
    end
    for (int s = 0; s < 8; s++) begin
      checks++;
      if (src_seen[s] == 0) begin
        failures++;
        $display("FAIL operand source %0d never used", s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
