// grid_block_tb: fewer PEs than grid points. The default 2x2 array holds a
// 4x2 grid, each PE in charge of a block of two horizontally adjacent
// points: p0 (west) in register-file word 0 and p1 (east) in word 1.
//
// One sweep of x_new = A + B x + C x(i+1) + D x(i-1) + E x(j+1) + F x(j-1)
// is applied to both points, each with its own coefficients:
//   p0: x(i+1) is the PE's own p1 (a register-file read), x(i-1) is the
//       west PE's p1 (published on its E-register), north/south are the
//       neighbours' p0 (published on N/S);
//   p1: x(i+1) is the east PE's p0 (published on its W-register), x(i-1)
//       is the PE's own p0, north/south are the neighbours' p1 (published
//       on N/S after p0 is done).
// The run is repeated for NSWEEP sweeps. Points outside the grid read the
// boundary inputs, held at 0 here. Expected values are computed in double
// precision over the 4x2 grid directly from the equation and must agree to
// a relative error of 1e-4.
module grid_block_tb;
  import sca_pkg::*;
  import fp_ref_pkg::*;

  localparam int NX = 2, NY = 2, PC_W = 8, IMEM_DEPTH = 256, NSWEEP = 3;
  localparam int GX = 2 * NX;                          // grid columns
  localparam int NLOAD = 14;                           // x0, x1, A0..F0, A1..F1
  localparam int R_X0 = 0, R_X1 = 1, R_C0 = 2, R_C1 = 8;

  logic            clk = 1'b0, rst_n, prog_we, start, busy, done, issue_valid;
  logic [PC_W-1:0] prog_addr, issue_pc;
  instr_t          prog_data;
  word_t           north_in [NX], south_in [NX], west_in [NY], east_in [NY];
  word_t           north_out [NX], south_out [NX], west_out [NY], east_out [NY];
  word_t           acc_out [NY][NX];

  systolic_top dut (.*);

  instr_t prog [$];
  word_t  west_tab [IMEM_DEPTH][NY];
  int     out_idx [IMEM_DEPTH], out_col [IMEM_DEPTH];
  word_t  ld [NY][NX][NLOAD];
  word_t  got [2][NY][NX];
  real    g [GX][NY], coef [GX][NY][6];                // grid [col][row], row = array row
  int     checks = 0, failures = 0, issued = 0;
  logic   last_valid;
  logic [PC_W-1:0] last_pc;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic instr_t op3(alu_op_e op, src_e sa, int aa, src_e sb, int ab, src_e sc, int ac);
    instr_t i;
    i = '{op: op, src_a: sa, src_b: sb, src_c: sc, default: '0};
    i.addr_a = rf_addr_t'(aa); i.addr_b = rf_addr_t'(ab); i.addr_c = rf_addr_t'(ac);
    return i;
  endfunction

  function automatic instr_t wr(instr_t i, logic acc, logic n, logic s, logic w, logic e, int rf);
    i.wr_acc = acc; i.wr_n = n; i.wr_s = s; i.wr_w = w; i.wr_e = e;
    if (rf >= 0) begin i.wr_rf = 1'b1; i.addr_d = rf_addr_t'(rf); end
    return i;
  endfunction

  // one point: x_new = A + B x + C xe + D xw + E xn + F xs, result into ACC
  task automatic point(int c0, int x, src_e se, int ae, src_e sw, int aw);
    prog.push_back(wr(op3(OP_MAC, SRC_RF, c0, SRC_RF, c0 + 1, SRC_RF, x), 1, 0, 0, 0, 0, -1));
    prog.push_back(wr(op3(OP_MAC, SRC_ACC, 0, SRC_RF, c0 + 2, se, ae), 1, 0, 0, 0, 0, -1));
    prog.push_back(wr(op3(OP_MAC, SRC_ACC, 0, SRC_RF, c0 + 3, sw, aw), 1, 0, 0, 0, 0, -1));
    prog.push_back(wr(op3(OP_MAC, SRC_ACC, 0, SRC_RF, c0 + 4, SRC_N, 0), 1, 0, 0, 0, 0, -1));
  endtask

  task automatic build_program();
    instr_t pass_w, keep;
    for (int p = 0; p < IMEM_DEPTH; p++) begin
      out_idx[p] = -1;
      for (int y = 0; y < NY; y++) west_tab[p][y] = '0;
    end
    for (int k = 0; k < NLOAD; k++)
      for (int s = 0; s < NX; s++) begin
        for (int y = 0; y < NY; y++) west_tab[prog.size()][y] = ld[y][NX-1-s][k];
        pass_w = op3(OP_PASS, SRC_ZERO, 0, SRC_ZERO, 0, SRC_W, 0);
        prog.push_back((s < NX - 1) ? wr(pass_w, 0, 0, 0, 0, 1, -1) : wr(pass_w, 0, 0, 0, 0, 0, k));
      end
    for (int it = 0; it < NSWEEP; it++) begin
      prog.push_back(wr(op3(OP_PASS, SRC_ZERO, 0, SRC_ZERO, 0, SRC_RF, R_X0), 0, 1, 1, 1, 0, -1));
      prog.push_back(wr(op3(OP_PASS, SRC_ZERO, 0, SRC_ZERO, 0, SRC_RF, R_X1), 0, 0, 0, 0, 1, -1));
      point(R_C0, R_X0, SRC_RF, R_X1, SRC_W, 0);
      // last term of p0 into word 14; p0's new value must not be read yet
      prog.push_back(wr(op3(OP_MAC, SRC_ACC, 0, SRC_RF, R_C0 + 5, SRC_S, 0), 1, 0, 0, 0, 0, 14));
      prog.push_back(wr(op3(OP_PASS, SRC_ZERO, 0, SRC_ZERO, 0, SRC_RF, R_X1), 0, 1, 1, 0, 0, -1));
      point(R_C1, R_X1, SRC_E, 0, SRC_RF, R_X0);
      prog.push_back(wr(op3(OP_MAC, SRC_ACC, 0, SRC_RF, R_C1 + 5, SRC_S, 0), 1, 0, 0, 0, 0, R_X1));
      keep = op3(OP_PASS, SRC_ZERO, 0, SRC_ZERO, 0, SRC_RF, 14);
      prog.push_back(wr(keep, 0, 0, 0, 0, 0, R_X0));
    end
    for (int w = 0; w < 2; w++)
      for (int s = 0; s < NX; s++) begin
        out_idx[prog.size()] = w;
        out_col[prog.size()] = NX - 1 - s;
        prog.push_back(wr(op3(OP_PASS, SRC_ZERO, 0, SRC_ZERO, 0, (s == 0) ? SRC_RF : SRC_W, w),
                          0, 0, 0, 0, 1, -1));
      end
    prog.push_back(op3(OP_HALT, SRC_ZERO, 0, SRC_ZERO, 0, SRC_ZERO, 0));
  endtask

  function automatic real at(real f [GX][NY], int c, int r);
    if (c < 0 || c >= GX || r < 0 || r >= NY) return 0.0;
    return f[c][r];
  endfunction

  task automatic reference();
    real nxt [GX][NY];
    for (int it = 0; it < NSWEEP; it++) begin
      for (int c = 0; c < GX; c++) for (int r = 0; r < NY; r++)
        nxt[c][r] = coef[c][r][0] + coef[c][r][1] * g[c][r]
                  + coef[c][r][2] * at(g, c + 1, r) + coef[c][r][3] * at(g, c - 1, r)
                  + coef[c][r][4] * at(g, c, r - 1)     // north: row above
                  + coef[c][r][5] * at(g, c, r + 1);    // south: row below
      g = nxt;
    end
  endtask

  always_comb begin
    for (int y = 0; y < NY; y++) begin west_in[y] = west_tab[issue_pc][y]; east_in[y] = '0; end
    for (int x = 0; x < NX; x++) begin north_in[x] = '0; south_in[x] = '0; end
  end

  always_ff @(posedge clk) begin
    last_valid <= issue_valid;
    last_pc    <= issue_pc;
  end

  always @(negedge clk) begin
    if (rst_n && last_valid && out_idx[last_pc] >= 0)
      for (int y = 0; y < NY; y++) got[out_idx[last_pc]][y][out_col[last_pc]] = east_out[y];
  end

  initial begin
    rst_n = 1'b0; prog_we = 1'b0; prog_addr = '0; prog_data = '0; start = 1'b0;
    for (int c = 0; c < GX; c++) for (int r = 0; r < NY; r++) begin
      g[c][r] = sp_to_real(sp_of(($urandom_range(2000) / 1000.0) - 1.0));
      for (int k = 0; k < 6; k++)
        coef[c][r][k] = sp_to_real(sp_of(($urandom_range(400) / 1000.0) - 0.2));
      ld[r][c / 2][c % 2] = sp_of(g[c][r]);
      for (int k = 0; k < 6; k++) ld[r][c / 2][((c % 2 != 0) ? R_C1 : R_C0) + k] = sp_of(coef[c][r][k]);
    end
    build_program();
    reference();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    foreach (prog[p]) begin
      @(negedge clk);
      prog_we = 1'b1; prog_addr = PC_W'(p); prog_data = prog[p];
    end
    @(negedge clk) prog_we = 1'b0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (!done) begin
      @(posedge clk);
      if (issue_valid) issued++;
    end
    @(negedge clk);
    checks++;
    if (issued != prog.size() - 1) begin
      failures++;
      $display("FAIL %0d issue cycles for %0d program words", issued, prog.size() - 1);
    end
    for (int c = 0; c < GX; c++) for (int r = 0; r < NY; r++) begin
      real hw, want, err;
      hw = sp_to_real(got[c % 2][r][c / 2]);
      want = g[c][r];
      err = (hw > want) ? hw - want : want - hw;
      checks++;
      if (err > 1e-4 * (1.0 + ((want < 0.0) ? -want : want))) begin
        failures++;
        $display("FAIL grid point (%0d,%0d): %f expected %f", c, r, hw, want);
      end
    end
    $display("4x2 grid on 2x2 PEs: %0d sweeps, %0d program words", NSWEEP, prog.size() - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
