// systolic_top_driver: host side of the end-to-end test of systolic_top.
//
// Drives a systolic_top instance (connected by the wrapper testbenches)
// through one complete stencil job, the way a host would:
//   1. writes a program into the sequencer's instruction memory;
//   2. the program first loads 7 words per PE (x, A, B, C, D, E, F) by
//      shifting them through the E-registers from the west edge, NX
//      instructions per word (the testbench presents each word on west_in
//      in the cycle the matching instruction is issued, timed by issue_pc);
//   3. it then applies x_new = A + B x + C x_E + D x_W + E x_N + F x_S
//      NIT times (one instruction publishes x to the four communication
//      registers, then one multiply-add per term, so 6 cycles per sweep);
//      edge PEs read the boundary inputs in place of missing neighbours;
//   4. computes y = (x_new + A)*B once, using the (a+b)c form;
//   5. shifts x_new and y out through the east edge, NX instructions each.
// Results are compared with values computed here from the loaded data with
// the reference arithmetic, in the same order of operations. The program
// is run twice (restart) and must take exactly its length in issue cycles.
// Counts how often each mechanism occurred (shift-in, reads from each of
// the four neighbours, reads of each boundary, accumulation, the (a+b)c
// form, shift-out, halt) and fails any that never did.
module systolic_top_driver
  import sca_pkg::*;
  import fp_ref_pkg::*;
#(
  parameter int NX         = 2,
  parameter int NY         = 2,
  parameter int IMEM_DEPTH = 256,
  parameter int PC_W       = $clog2(IMEM_DEPTH),
  parameter int NIT        = 2
) (
  output logic            clk,
  output logic            rst_n,
  output logic            prog_we,
  output logic [PC_W-1:0] prog_addr,
  output instr_t          prog_data,
  output logic            start,
  input  logic            busy,
  input  logic            done,
  input  logic            issue_valid,
  input  logic [PC_W-1:0] issue_pc,
  output word_t           north_in  [NX],
  output word_t           south_in  [NX],
  output word_t           west_in   [NY],
  output word_t           east_in   [NY],
  input  word_t           north_out [NX],
  input  word_t           south_out [NX],
  input  word_t           west_out  [NY],
  input  word_t           east_out  [NY],
  input  word_t           acc_out   [NY][NX]
);

  localparam int NWORDS = 7;                       // x, A..F
  localparam int WORD_X = 0, WORD_A = 1, WORD_B = 2, WORD_C = 3,
                 WORD_D = 4, WORD_E = 5, WORD_F = 6, WORD_Y = 8;
  localparam int NOUT   = 2;                       // x_new (RF0), y (RF8)

  typedef enum int {M_SHIFT_IN, M_READ_N, M_READ_S, M_READ_W, M_READ_E,
                    M_BND_N, M_BND_S, M_BND_W, M_BND_E, M_ACCUM, M_AMUL,
                    M_SHIFT_OUT, M_HALT, M_RESTART, M_COUNT} mech_e;

  instr_t prog [$];
  word_t  west_tab [IMEM_DEPTH][NY];
  int     out_word [IMEM_DEPTH];                   // readout: word index or -1
  int     out_col  [IMEM_DEPTH];                   // column leaving at this step
  word_t  data [NY][NX][NWORDS];
  word_t  exp_x [NY][NX], exp_y [NY][NX];
  word_t  got  [NOUT][NY][NX];
  int     mech [M_COUNT];
  int     checks = 0, failures = 0;
  int     issued, run_cycles;
  logic   last_valid;
  logic [PC_W-1:0] last_pc;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(word_t g, word_t w, string what);
    checks++;
    if (g !== w) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h expected %h", what, g, w);
    end
  endtask

  function automatic instr_t mk(alu_op_e op, src_e sa, int aa, src_e sb, int ab,
                                src_e sc, int ac);
    instr_t i;
    i = '{op: op, src_a: sa, src_b: sb, src_c: sc, default: '0};
    i.addr_a = rf_addr_t'(aa); i.addr_b = rf_addr_t'(ab); i.addr_c = rf_addr_t'(ac);
    return i;
  endfunction

  // ---- program ------------------------------------------------------------
  task automatic build_program();
    instr_t i;
    for (int p = 0; p < IMEM_DEPTH; p++) begin
      out_word[p] = -1;
      for (int y = 0; y < NY; y++) west_tab[p][y] = rand_sp(120, 130);
    end
    // load: word k reaches column c after NX instructions
    for (int k = 0; k < NWORDS; k++) begin
      for (int s = 0; s < NX; s++) begin
        for (int y = 0; y < NY; y++) west_tab[prog.size()][y] = data[y][NX-1-s][k];
        if (s < NX - 1) begin
          i = mk(OP_PASS, SRC_ZERO, 0, SRC_ZERO, 0, SRC_W, 0); i.wr_e = 1'b1;
        end else begin
          i = mk(OP_PASS, SRC_ZERO, 0, SRC_ZERO, 0, SRC_W, 0); i.wr_rf = 1'b1; i.addr_d = rf_addr_t'(k);
        end
        prog.push_back(i);
      end
    end
    // NIT sweeps of x_new = A + B x + C x_E + D x_W + E x_N + F x_S
    for (int it = 0; it < NIT; it++) begin
      i = mk(OP_PASS, SRC_ZERO, 0, SRC_ZERO, 0, SRC_RF, WORD_X);
      i.wr_n = 1; i.wr_s = 1; i.wr_w = 1; i.wr_e = 1;
      prog.push_back(i);
      i = mk(OP_MAC, SRC_RF, WORD_A, SRC_RF, WORD_B, SRC_RF, WORD_X); i.wr_acc = 1; prog.push_back(i);
      i = mk(OP_MAC, SRC_ACC, 0, SRC_RF, WORD_C, SRC_E, 0);           i.wr_acc = 1; prog.push_back(i);
      i = mk(OP_MAC, SRC_ACC, 0, SRC_RF, WORD_D, SRC_W, 0);           i.wr_acc = 1; prog.push_back(i);
      i = mk(OP_MAC, SRC_ACC, 0, SRC_RF, WORD_E, SRC_N, 0);           i.wr_acc = 1; prog.push_back(i);
      i = mk(OP_MAC, SRC_ACC, 0, SRC_RF, WORD_F, SRC_S, 0);
      i.wr_acc = 1; i.wr_rf = 1; i.addr_d = rf_addr_t'(WORD_X);
      prog.push_back(i);
    end
    // y = (x_new + A) * B
    i = mk(OP_AMUL, SRC_RF, WORD_X, SRC_RF, WORD_A, SRC_RF, WORD_B);
    i.wr_rf = 1; i.addr_d = rf_addr_t'(WORD_Y);
    prog.push_back(i);
    // shift out x_new and y through the east edge
    for (int w = 0; w < NOUT; w++) begin
      for (int s = 0; s < NX; s++) begin
        if (s == 0) i = mk(OP_PASS, SRC_ZERO, 0, SRC_ZERO, 0, SRC_RF, (w == 0) ? WORD_X : WORD_Y);
        else        i = mk(OP_PASS, SRC_ZERO, 0, SRC_ZERO, 0, SRC_W, 0);
        i.wr_e = 1'b1;
        out_word[prog.size()] = w;
        out_col[prog.size()]  = NX - 1 - s;
        prog.push_back(i);
      end
    end
    i = mk(OP_HALT, SRC_ZERO, 0, SRC_ZERO, 0, SRC_ZERO, 0);
    prog.push_back(i);
  endtask

  // ---- reference ----------------------------------------------------------
  task automatic compute_expected();
    word_t x [NY][NX], xn [NY][NX], acc;
    for (int y = 0; y < NY; y++) for (int c = 0; c < NX; c++) x[y][c] = data[y][c][WORD_X];
    for (int it = 0; it < NIT; it++) begin
      for (int y = 0; y < NY; y++) for (int c = 0; c < NX; c++) begin
        word_t xe, xw, xnn, xs;
        xe  = (c == NX - 1) ? east_in[y]  : x[y][c+1];
        xw  = (c == 0)      ? west_tab[prog_len_at_sweep(it)][y] : x[y][c-1];
        xnn = (y == 0)      ? north_in[c] : x[y-1][c];
        xs  = (y == NY - 1) ? south_in[c] : x[y+1][c];
        acc = ref_add(data[y][c][WORD_A], ref_mul(data[y][c][WORD_B], x[y][c]));
        acc = ref_add(acc, ref_mul(data[y][c][WORD_C], xe));
        acc = ref_add(acc, ref_mul(data[y][c][WORD_D], xw));
        acc = ref_add(acc, ref_mul(data[y][c][WORD_E], xnn));
        acc = ref_add(acc, ref_mul(data[y][c][WORD_F], xs));
        xn[y][c] = acc;
      end
      x = xn;
    end
    for (int y = 0; y < NY; y++) for (int c = 0; c < NX; c++) begin
      exp_x[y][c] = x[y][c];
      exp_y[y][c] = ref_mul(ref_add(x[y][c], data[y][c][WORD_A]), data[y][c][WORD_B]);
    end
  endtask

  // program address of the west-boundary read in sweep `it`
  function automatic int prog_len_at_sweep(int it);
    return NWORDS * NX + it * 6 + 3;
  endfunction

  // ---- boundary drive and observation --------------------------------------
  always_comb begin
    for (int y = 0; y < NY; y++) west_in[y] = west_tab[issue_pc][y];
  end

  always_ff @(posedge clk) begin
    last_valid <= issue_valid;
    last_pc    <= issue_pc;
  end

  // after a readout instruction has executed, east_out holds one column
  always @(negedge clk) begin
    if (rst_n && last_valid && out_word[last_pc] >= 0) begin
      for (int y = 0; y < NY; y++) got[out_word[last_pc]][y][out_col[last_pc]] = east_out[y];
      mech[M_SHIFT_OUT]++;
    end
  end

  // mechanism counts from the instructions as issued
  always @(negedge clk) begin
    if (rst_n && issue_valid) begin
      instr_t i;
      i = prog[issue_pc];
      if (i.op == OP_PASS && i.src_c == SRC_W && i.wr_e) mech[M_SHIFT_IN]++;
      if (i.op == OP_MAC && i.src_a == SRC_ACC) mech[M_ACCUM]++;
      if (i.op == OP_AMUL) mech[M_AMUL]++;
      if (i.op == OP_MAC) begin
        if (i.src_c == SRC_N) begin if (NY > 1) mech[M_READ_N]++; mech[M_BND_N]++; end
        if (i.src_c == SRC_S) begin if (NY > 1) mech[M_READ_S]++; mech[M_BND_S]++; end
        if (i.src_c == SRC_W) begin if (NX > 1) mech[M_READ_W]++; mech[M_BND_W]++; end
        if (i.src_c == SRC_E) begin if (NX > 1) mech[M_READ_E]++; mech[M_BND_E]++; end
      end
    end
    if (rst_n && done) mech[M_HALT]++;
  end

  task automatic run_once();
    issued = 0; run_cycles = 0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (!done) begin
      @(posedge clk);
      if (issue_valid) issued++;
      run_cycles++;
    end
    checks++;
    if (issued != prog.size() - 1) begin
      failures++;
      $display("FAIL issue cycles %0d, program has %0d words", issued, prog.size() - 1);
    end
    @(negedge clk);
    for (int y = 0; y < NY; y++) for (int c = 0; c < NX; c++) begin
      cmp(got[0][y][c], exp_x[y][c], $sformatf("x_new PE%0d%0d", c, y));
      cmp(got[1][y][c], exp_y[y][c], $sformatf("(x_new+A)*B PE%0d%0d", c, y));
    end
  endtask

  initial begin
    rst_n = 1'b0; prog_we = 1'b0; prog_addr = '0; prog_data = '0; start = 1'b0;
    foreach (north_in[c]) begin north_in[c] = rand_sp(120, 130); south_in[c] = rand_sp(120, 130); end
    foreach (east_in[y]) east_in[y] = rand_sp(120, 130);
    for (int y = 0; y < NY; y++) for (int c = 0; c < NX; c++) begin
      data[y][c][WORD_X] = rand_sp(120, 130);
      data[y][c][WORD_A] = rand_sp(120, 130);
      for (int k = WORD_B; k <= WORD_F; k++) data[y][c][k] = rand_sp(118, 124); // |coef| < 1/8
    end
    build_program();
    if (prog.size() > IMEM_DEPTH) $fatal(1, "program too long");
    compute_expected();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    foreach (prog[p]) begin
      @(negedge clk);
      prog_we = 1'b1; prog_addr = PC_W'(p); prog_data = prog[p];
    end
    @(negedge clk) prog_we = 1'b0;
    run_once();
    for (int y = 0; y < NY; y++) for (int c = 0; c < NX; c++) got[0][y][c] = '0;
    mech[M_RESTART]++;
    run_once();
    $display("%0dx%0d array, program %0d words, %0d cycles per run, %0d cycles per stencil sweep",
             NX, NY, prog.size() - 1, run_cycles, 6);
    for (int m = 0; m < M_COUNT; m++) begin
      mech_e me;
      me = mech_e'(m);
      $display("  mechanism %-12s seen %0d times", me.name(), mech[m]);
      checks++;
      if (mech[m] == 0 && !((me == M_READ_N || me == M_READ_S) && NY == 1)
                       && !((me == M_READ_W || me == M_READ_E) && NX == 1)) begin
        failures++;
        $display("FAIL mechanism %s never happened", me.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
