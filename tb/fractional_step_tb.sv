// fractional_step_tb: one time step of the 2-D fractional step method run
// on a 4x4 array, one staggered-grid cell (u, v, phi) per PE.
//
// The program, generated here, computes on the array:
//   Step 1  v_on_u and u_on_v from four neighbours each (the diagonal ones
//           reach the PE in two hops through the communication registers),
//           the convection/diffusion coefficients b..e for u and for v, and
//           the tentative velocities
//             u* = a u + b_u u(i+1) + c_u u(i-1) + d_u u(j+1) + e_u u(j-1)
//             v* = a v + b_v v(i+1) + c_v v(i-1) + d_v v(j+1) + e_v v(j-1)
//   Step 2  D = ((u* - u*(i-1))/dx + (v* - v*(j-1))/dy) / dt and the update
//             phi' = K((phi(i+1)+phi(i-1))/dx^2 + (phi(j+1)+phi(j-1))/dy^2 - D)
//           with K = dx^2 dy^2 / (2(dx^2+dy^2)), solved by NP red-black SOR
//           iterations (relaxation factor OMEGA; OMEGA = 1 is Gauss-Seidel in
//           red-black order). Every PE runs the same instructions: each PE
//           holds a weight that is OMEGA on one colour and 0 on the other, and
//           derives from it, for each half-sweep, the coefficients of
//             phi' = (1 - w) phi + w K((phi(i+1)+phi(i-1))/dx^2 + ... - D)
//           so that a point of the idle colour keeps its value (w = 0).
//   Step 3  u = u* - dt/dx (phi(i+1) - phi), v = v* - dt/dy (phi(j+1) - phi)
// and then shifts u*, v*, phi, u and v out through the east edge.
// Grid index i grows to the east (array column x) and j to the north
// (array row y = NY-1-j). Values outside the array are zero: every boundary
// input is held at 0.
//
// The expected values are computed here in double precision directly from
// the equations above, independently of the instruction schedule, and each
// array result must agree to a relative error of 1e-4. The cycle count of
// the run is checked against the program length.
module fractional_step_tb;
  import sca_pkg::*;
  import fp_ref_pkg::*;

  localparam int NX = 4, NY = 4, IMEM_DEPTH = 256, PC_W = 8, NP = 3;
  localparam real OMEGA = 1.5;

  // register-file map
  localparam int R_U = 0, R_V = 1, R_PHI = 2, R_US = 3, R_VS = 4, R_D = 5,
                 R_VONU = 6, R_UONV = 7,
                 R_A = 8, R_KX = 9, R_NHX = 10, R_HX = 11, R_KY = 12, R_NHY = 13,
                 R_HY = 14, R_PX = 15, R_PY = 16, R_CX = 17, R_CY = 18, R_CD = 19,
                 R_NTX = 20, R_NTY = 21, R_QUARTER = 22, R_MONE = 23,
                 R_C1 = 24, R_C2 = 25, R_C3 = 26, R_C4 = 27,
                 R_WRED = 28, R_WBLK = 29;             // SOR weight per colour
  localparam int NLOAD = 30;                           // words 0..29 are loaded
  // per-half-sweep SOR coefficients, computed in the PEs after Step 1 into
  // words Step 1 no longer needs: {1-w, w cx, w cy, w cD}
  localparam int SOR_W [2][4] = '{'{8, 9, 10, 11}, '{12, 13, 14, 24}};
  localparam int NOUT  = 5;
  localparam int OUT_WORD [NOUT] = '{R_US, R_VS, R_PHI, R_U, R_V};

  // physical constants
  localparam real DX = 0.125, DY = 0.125, NU = 0.05, DT = 0.01;

  logic            clk = 1'b0, rst_n, prog_we, start, busy, done, issue_valid;
  logic [PC_W-1:0] prog_addr, issue_pc;
  instr_t          prog_data;
  word_t           north_in [NX], south_in [NX], west_in [NY], east_in [NY];
  word_t           north_out [NX], south_out [NX], west_out [NY], east_out [NY];
  word_t           acc_out [NY][NX];

  systolic_top #(.NX(NX), .NY(NY), .IMEM_DEPTH(IMEM_DEPTH), .PC_W(PC_W)) dut (.*);

  instr_t prog [$];
  word_t  west_tab [IMEM_DEPTH][NY];
  int     out_idx [IMEM_DEPTH];
  int     out_col [IMEM_DEPTH];
  word_t  ld [NY][NX][NLOAD];
  word_t  got [NOUT][NY][NX];
  real    u [NX][NY], v [NX][NY];                      // grid-indexed [i][j]
  real    us [NX][NY], vs [NX][NY], phi [NX][NY], un [NX][NY], vn [NX][NY];
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

  // ---- program construction -------------------------------------------------
  function automatic instr_t op3(alu_op_e op, src_e sa, int aa, src_e sb, int ab, src_e sc, int ac);
    instr_t i;
    i = '{op: op, src_a: sa, src_b: sb, src_c: sc, default: '0};
    i.addr_a = rf_addr_t'(aa); i.addr_b = rf_addr_t'(ab); i.addr_c = rf_addr_t'(ac);
    return i;
  endfunction

  function automatic instr_t to_rf(instr_t i, int d);
    i.wr_rf = 1'b1; i.addr_d = rf_addr_t'(d);
    return i;
  endfunction

  function automatic instr_t to_acc(instr_t i);
    i.wr_acc = 1'b1;
    return i;
  endfunction

  function automatic instr_t to_regs(instr_t i, logic n, logic s, logic w, logic e);
    i.wr_n = n; i.wr_s = s; i.wr_w = w; i.wr_e = e;
    return i;
  endfunction

  function automatic instr_t pass(src_e sc, int ac);
    return op3(OP_PASS, SRC_ZERO, 0, SRC_ZERO, 0, sc, ac);
  endfunction

  // acc = a + b*c with a from the accumulator
  function automatic instr_t acc_mac(int b, src_e sc, int ac);
    return to_acc(op3(OP_MAC, SRC_ACC, 0, SRC_RF, b, sc, ac));
  endfunction

  // stencil x* = a x + c1 x(i+1) + c2 x(i-1) + c3 x(j+1) + c4 x(j-1) -> dst
  task automatic stencil(int x, int dst);
    prog.push_back(to_regs(pass(SRC_RF, x), 1, 1, 1, 1));
    prog.push_back(to_acc(op3(OP_MAC, SRC_ZERO, 0, SRC_RF, R_A, SRC_RF, x)));
    prog.push_back(acc_mac(R_C1, SRC_E, 0));
    prog.push_back(acc_mac(R_C2, SRC_W, 0));
    prog.push_back(acc_mac(R_C3, SRC_N, 0));
    prog.push_back(to_rf(acc_mac(R_C4, SRC_S, 0), dst));
  endtask

  // coefficient k + h*x for the four stencil coefficients
  task automatic coeffs(int xc, int yc);
    prog.push_back(to_rf(op3(OP_MAC, SRC_RF, R_KX, SRC_RF, R_NHX, SRC_RF, xc), R_C1));
    prog.push_back(to_rf(op3(OP_MAC, SRC_RF, R_KX, SRC_RF, R_HX,  SRC_RF, xc), R_C2));
    prog.push_back(to_rf(op3(OP_MAC, SRC_RF, R_KY, SRC_RF, R_NHY, SRC_RF, yc), R_C3));
    prog.push_back(to_rf(op3(OP_MAC, SRC_RF, R_KY, SRC_RF, R_HY,  SRC_RF, yc), R_C4));
  endtask

  task automatic build_program();
    for (int p = 0; p < IMEM_DEPTH; p++) begin
      out_idx[p] = -1;
      for (int y = 0; y < NY; y++) west_tab[p][y] = '0;
    end
    // load
    for (int k = 0; k < NLOAD; k++)
      for (int s = 0; s < NX; s++) begin
        for (int y = 0; y < NY; y++) west_tab[prog.size()][y] = ld[y][NX-1-s][k];
        if (s < NX - 1) prog.push_back(to_regs(pass(SRC_W, 0), 0, 0, 0, 1));
        else            prog.push_back(to_rf(pass(SRC_W, 0), k));
      end
    // Step 1, u: v_on_u = (v(i,j-1) + v + v(i+1,j-1) + v(i+1,j)) / 4
    prog.push_back(to_regs(pass(SRC_RF, R_V), 1, 0, 1, 0));            // v -> N, W
    prog.push_back(to_acc(op3(OP_MAC, SRC_RF, R_V, SRC_ONE, 0, SRC_E, 0)));  // v + v(i+1,j)
    prog.push_back(to_acc(op3(OP_MAC, SRC_ACC, 0, SRC_ONE, 0, SRC_S, 0)));   // + v(i,j-1)
    prog.push_back(to_regs(pass(SRC_S, 0), 0, 0, 1, 0));               // v(i,j-1) -> W
    prog.push_back(to_acc(op3(OP_MAC, SRC_ACC, 0, SRC_ONE, 0, SRC_E, 0)));   // + v(i+1,j-1)
    prog.push_back(to_rf(op3(OP_MAC, SRC_ZERO, 0, SRC_RF, R_QUARTER, SRC_ACC, 0), R_VONU));
    coeffs(R_U, R_VONU);
    stencil(R_U, R_US);
    // Step 1, v: u_on_v = (u(i-1,j) + u + u(i-1,j+1) + u(i,j+1)) / 4
    prog.push_back(to_regs(pass(SRC_RF, R_U), 0, 1, 0, 1));            // u -> S, E
    prog.push_back(to_acc(op3(OP_MAC, SRC_RF, R_U, SRC_ONE, 0, SRC_W, 0)));  // u + u(i-1,j)
    prog.push_back(to_acc(op3(OP_MAC, SRC_ACC, 0, SRC_ONE, 0, SRC_N, 0)));   // + u(i,j+1)
    prog.push_back(to_regs(pass(SRC_N, 0), 0, 0, 0, 1));               // u(i,j+1) -> E
    prog.push_back(to_acc(op3(OP_MAC, SRC_ACC, 0, SRC_ONE, 0, SRC_W, 0)));   // + u(i-1,j+1)
    prog.push_back(to_rf(op3(OP_MAC, SRC_ZERO, 0, SRC_RF, R_QUARTER, SRC_ACC, 0), R_UONV));
    coeffs(R_UONV, R_V);
    stencil(R_V, R_VS);
    // Step 2: D, then NP Jacobi sweeps for phi
    prog.push_back(to_regs(pass(SRC_RF, R_US), 0, 0, 0, 1));           // u* -> E
    prog.push_back(to_regs(pass(SRC_RF, R_VS), 1, 0, 0, 0));           // v* -> N
    prog.push_back(to_acc(op3(OP_MAC, SRC_RF, R_US, SRC_RF, R_MONE, SRC_W, 0)));   // u* - u*(i-1)
    prog.push_back(to_rf(op3(OP_MAC, SRC_ZERO, 0, SRC_RF, R_PX, SRC_ACC, 0), R_D));
    prog.push_back(to_acc(op3(OP_MAC, SRC_RF, R_VS, SRC_RF, R_MONE, SRC_S, 0)));   // v* - v*(j-1)
    prog.push_back(to_rf(op3(OP_MAC, SRC_RF, R_D, SRC_RF, R_PY, SRC_ACC, 0), R_D));
    for (int c = 0; c < 2; c++) begin
      int w;
      w = (c == 0) ? R_WRED : R_WBLK;
      prog.push_back(to_rf(op3(OP_MAC, SRC_ONE, 0, SRC_RF, R_MONE, SRC_RF, w), SOR_W[c][0]));
      prog.push_back(to_rf(op3(OP_MAC, SRC_ZERO, 0, SRC_RF, w, SRC_RF, R_CX), SOR_W[c][1]));
      prog.push_back(to_rf(op3(OP_MAC, SRC_ZERO, 0, SRC_RF, w, SRC_RF, R_CY), SOR_W[c][2]));
      prog.push_back(to_rf(op3(OP_MAC, SRC_ZERO, 0, SRC_RF, w, SRC_RF, R_CD), SOR_W[c][3]));
    end
    for (int it = 0; it < NP; it++)
      for (int c = 0; c < 2; c++) begin
        prog.push_back(to_regs(pass(SRC_RF, R_PHI), 1, 1, 1, 1));
        prog.push_back(to_acc(op3(OP_MAC, SRC_ZERO, 0, SRC_RF, SOR_W[c][0], SRC_RF, R_PHI)));
        prog.push_back(acc_mac(SOR_W[c][3], SRC_RF, R_D));
        prog.push_back(acc_mac(SOR_W[c][1], SRC_E, 0));
        prog.push_back(acc_mac(SOR_W[c][1], SRC_W, 0));
        prog.push_back(acc_mac(SOR_W[c][2], SRC_N, 0));
        prog.push_back(to_rf(acc_mac(SOR_W[c][2], SRC_S, 0), R_PHI));
      end
    // Step 3
    prog.push_back(to_regs(pass(SRC_RF, R_PHI), 0, 1, 1, 0));          // phi -> S, W
    prog.push_back(to_acc(op3(OP_MAC, SRC_E, 0, SRC_RF, R_MONE, SRC_RF, R_PHI)));  // phi(i+1) - phi
    prog.push_back(to_rf(op3(OP_MAC, SRC_RF, R_US, SRC_RF, R_NTX, SRC_ACC, 0), R_U));
    prog.push_back(to_acc(op3(OP_MAC, SRC_N, 0, SRC_RF, R_MONE, SRC_RF, R_PHI)));  // phi(j+1) - phi
    prog.push_back(to_rf(op3(OP_MAC, SRC_RF, R_VS, SRC_RF, R_NTY, SRC_ACC, 0), R_V));
    // unload
    for (int w = 0; w < NOUT; w++)
      for (int s = 0; s < NX; s++) begin
        out_idx[prog.size()] = w;
        out_col[prog.size()] = NX - 1 - s;
        if (s == 0) prog.push_back(to_regs(pass(SRC_RF, OUT_WORD[w]), 0, 0, 0, 1));
        else        prog.push_back(to_regs(pass(SRC_W, 0), 0, 0, 0, 1));
      end
    prog.push_back(op3(OP_HALT, SRC_ZERO, 0, SRC_ZERO, 0, SRC_ZERO, 0));
  endtask

  // ---- reference, straight from the equations ---------------------------------
  function automatic real at(real f [NX][NY], int i, int j);
    if (i < 0 || i >= NX || j < 0 || j >= NY) return 0.0;
    return f[i][j];
  endfunction

  task automatic reference();
    real a, k, d [NX][NY], pn [NX][NY];
    a = 1.0 - 2.0 * NU * DT * (1.0 / (DX * DX) + 1.0 / (DY * DY));
    for (int i = 0; i < NX; i++) for (int j = 0; j < NY; j++) begin
      real vonu, uonv;
      vonu = 0.25 * (at(v, i, j-1) + v[i][j] + at(v, i+1, j-1) + at(v, i+1, j));
      uonv = 0.25 * (at(u, i-1, j) + u[i][j] + at(u, i-1, j+1) + at(u, i, j+1));
      us[i][j] = a * u[i][j]
               + DT * (NU / (DX * DX) - u[i][j] / (2.0 * DX)) * at(u, i+1, j)
               + DT * (NU / (DX * DX) + u[i][j] / (2.0 * DX)) * at(u, i-1, j)
               + DT * (NU / (DY * DY) - vonu / (2.0 * DY)) * at(u, i, j+1)
               + DT * (NU / (DY * DY) + vonu / (2.0 * DY)) * at(u, i, j-1);
      vs[i][j] = a * v[i][j]
               + DT * (NU / (DX * DX) - uonv / (2.0 * DX)) * at(v, i+1, j)
               + DT * (NU / (DX * DX) + uonv / (2.0 * DX)) * at(v, i-1, j)
               + DT * (NU / (DY * DY) - v[i][j] / (2.0 * DY)) * at(v, i, j+1)
               + DT * (NU / (DY * DY) + v[i][j] / (2.0 * DY)) * at(v, i, j-1);
    end
    for (int i = 0; i < NX; i++) for (int j = 0; j < NY; j++) begin
      d[i][j] = ((us[i][j] - at(us, i-1, j)) / DX + (vs[i][j] - at(vs, i, j-1)) / DY) / DT;
      phi[i][j] = 0.0;
    end
    k = DX * DX * DY * DY / (2.0 * (DX * DX + DY * DY));
    for (int it = 0; it < NP; it++)
      for (int c = 0; c < 2; c++) begin
        for (int i = 0; i < NX; i++) for (int j = 0; j < NY; j++)
          if ((i + j) % 2 == c)
            pn[i][j] = (1.0 - OMEGA) * phi[i][j]
                     + OMEGA * k * ((at(phi, i+1, j) + at(phi, i-1, j)) / (DX * DX)
                                  + (at(phi, i, j+1) + at(phi, i, j-1)) / (DY * DY) - d[i][j]);
          else
            pn[i][j] = phi[i][j];
        phi = pn;
      end
    for (int i = 0; i < NX; i++) for (int j = 0; j < NY; j++) begin
      un[i][j] = us[i][j] - DT / DX * (at(phi, i+1, j) - phi[i][j]);
      vn[i][j] = vs[i][j] - DT / DY * (at(phi, i, j+1) - phi[i][j]);
    end
  endtask

  // ---- boundary drive and readout ---------------------------------------------
  always_comb begin
    for (int y = 0; y < NY; y++) west_in[y] = west_tab[issue_pc][y];
    for (int x = 0; x < NX; x++) begin north_in[x] = '0; south_in[x] = '0; end
    for (int y = 0; y < NY; y++) east_in[y] = '0;
  end

  always_ff @(posedge clk) begin
    last_valid <= issue_valid;
    last_pc    <= issue_pc;
  end

  always @(negedge clk) begin
    if (rst_n && last_valid && out_idx[last_pc] >= 0)
      for (int y = 0; y < NY; y++) got[out_idx[last_pc]][y][out_col[last_pc]] = east_out[y];
  end

  task automatic close(string what, int x, int y, word_t g, real want);
    real r, err;
    r = sp_to_real(g);
    err = r - want;
    if (err < 0.0) err = -err;
    checks++;
    if (err > 1e-4 * (1.0 + ((want < 0.0) ? -want : want))) begin
      failures++;
      if (failures < 10) $display("FAIL %s at i=%0d j=%0d: %f expected %f", what, x, NY-1-y, r, want);
    end
  endtask

  initial begin
    real consts [NLOAD];
    rst_n = 1'b0; prog_we = 1'b0; prog_addr = '0; prog_data = '0; start = 1'b0;
    consts[R_A]       = 1.0 - 2.0 * NU * DT * (1.0 / (DX * DX) + 1.0 / (DY * DY));
    consts[R_KX]      = DT * NU / (DX * DX);
    consts[R_HX]      = DT / (2.0 * DX);
    consts[R_NHX]     = -consts[R_HX];
    consts[R_KY]      = DT * NU / (DY * DY);
    consts[R_HY]      = DT / (2.0 * DY);
    consts[R_NHY]     = -consts[R_HY];
    consts[R_PX]      = 1.0 / (DT * DX);
    consts[R_PY]      = 1.0 / (DT * DY);
    consts[R_CD]      = -DX * DX * DY * DY / (2.0 * (DX * DX + DY * DY));
    consts[R_CX]      = -consts[R_CD] / (DX * DX);
    consts[R_CY]      = -consts[R_CD] / (DY * DY);
    consts[R_NTX]     = -DT / DX;
    consts[R_NTY]     = -DT / DY;
    consts[R_QUARTER] = 0.25;
    consts[R_MONE]    = -1.0;
    for (int x = 0; x < NX; x++) for (int y = 0; y < NY; y++) begin
      int j;
      j = NY - 1 - y;
      u[x][j] = sp_to_real(sp_of(($urandom_range(2000) / 1000.0) - 1.0));
      v[x][j] = sp_to_real(sp_of(($urandom_range(2000) / 1000.0) - 1.0));
      ld[y][x][R_U]   = sp_of(u[x][j]);
      ld[y][x][R_V]   = sp_of(v[x][j]);
      ld[y][x][R_PHI] = '0;
      for (int w = R_US; w < R_A; w++) ld[y][x][w] = '0;
      for (int w = R_A; w < R_WRED; w++) ld[y][x][w] = sp_of(consts[w]);
      ld[y][x][R_WRED] = ((x + j) % 2 == 0) ? sp_of(OMEGA) : '0;
      ld[y][x][R_WBLK] = ((x + j) % 2 == 1) ? sp_of(OMEGA) : '0;
    end
    build_program();
    if (prog.size() > IMEM_DEPTH) $fatal(1, "program too long");
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
    for (int x = 0; x < NX; x++) for (int y = 0; y < NY; y++) begin
      int j;
      j = NY - 1 - y;
      close("u*",  x, y, got[0][y][x], us[x][j]);
      close("v*",  x, y, got[1][y][x], vs[x][j]);
      close("phi", x, y, got[2][y][x], phi[x][j]);
      close("u",   x, y, got[3][y][x], un[x][j]);
      close("v",   x, y, got[4][y][x], vn[x][j]);
    end
    $display("fractional step on %0dx%0d PEs: %0d program words, %0d cycles (%0d for loading, %0d for unloading)",
             NX, NY, prog.size() - 1, issued, NLOAD * NX, NOUT * NX);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
