// pe_array_tb: self-checking test of the PE mesh and its neighbour wiring.
//
// Runs a 3x2 array (non-square, so that swapped row and column indices
// show) through a random stream of broadcast instructions with random
// boundary inputs, and compares every accumulator and every edge output
// after each cycle with a model that steps every PE of pe_model_pkg with
// its neighbours' facing communication registers (north neighbour's S,
// south's N, west's E, east's W) or the boundary inputs at the edges.
module pe_array_tb;
  import sca_pkg::*;
  import fp_ref_pkg::*;
  import pe_model_pkg::*;

  localparam int NX = 3;
  localparam int NY = 2;

  logic      clk = 1'b0, rst_n;
  instr_t    instr;
  word_t     north_in [NX], south_in [NX], west_in [NY], east_in [NY];
  word_t     north_out [NX], south_out [NX], west_out [NY], east_out [NY];
  word_t     acc_out [NY][NX];
  pe_state_t m [NY][NX];
  int        checks = 0, failures = 0;

  pe_array #(.NX(NX), .NY(NY), .RF_DEPTH(32)) dut (
    .clk(clk), .rst_n(rst_n), .instr(instr),
    .north_in(north_in), .south_in(south_in), .west_in(west_in), .east_in(east_in),
    .north_out(north_out), .south_out(south_out), .west_out(west_out), .east_out(east_out),
    .acc_out(acc_out)
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
    for (int y = 0; y < NY; y++)
      for (int x = 0; x < NX; x++) cmp(acc_out[y][x], m[y][x].acc, $sformatf("acc PE%0d%0d", x, y));
    for (int x = 0; x < NX; x++) begin
      cmp(north_out[x], m[0][x].n, "north_out");
      cmp(south_out[x], m[NY-1][x].s, "south_out");
    end
    for (int y = 0; y < NY; y++) begin
      cmp(west_out[y], m[y][0].w, "west_out");
      cmp(east_out[y], m[y][NX-1].e, "east_out");
    end
  endtask

  task automatic step(instr_t i);
    pe_state_t old [NY][NX];
    @(negedge clk);
    instr = i;
    foreach (north_in[x]) begin north_in[x] = rand_sp(110, 144); south_in[x] = rand_sp(110, 144); end
    foreach (west_in[y])  begin west_in[y]  = rand_sp(110, 144); east_in[y]  = rand_sp(110, 144); end
    old = m;
    for (int y = 0; y < NY; y++)
      for (int x = 0; x < NX; x++)
        pe_step(m[y][x], i,
                (y == 0)      ? north_in[x] : old[y-1][x].s,
                (y == NY - 1) ? south_in[x] : old[y+1][x].n,
                (x == 0)      ? west_in[y]  : old[y][x-1].e,
                (x == NX - 1) ? east_in[y]  : old[y][x+1].w);
    @(posedge clk);
    #1 compare_all();
  endtask

  initial begin
    rst_n = 1'b0;
    instr = '{op: OP_NOP, src_a: SRC_ZERO, src_b: SRC_ZERO, src_c: SRC_ZERO, default: '0};
    foreach (north_in[x]) begin north_in[x] = '0; south_in[x] = '0; end
    foreach (west_in[y])  begin west_in[y] = '0;  east_in[y] = '0;  end
    for (int y = 0; y < NY; y++)
      for (int x = 0; x < NX; x++) begin
        m[y][x].acc = '0; m[y][x].n = '0; m[y][x].s = '0; m[y][x].w = '0; m[y][x].e = '0;
      end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < 32; k++) step(pass_to_rf(SRC_W, rf_addr_t'(k)));
    repeat (6000) step(rand_instr());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
