// sequencer_tb: self-checking test of the instruction broadcaster.
//
// Loads programs of random instruction words ending in HALT, starts them and
// checks, cycle by cycle, that word k is presented on instr with
// issue_valid high and issue_pc = k from the (k+2)-th clock edge after start is sampled, that a
// NOP is presented when idle, that done pulses once right after the last
// word and that busy covers exactly the run. A program of L words must take
// L issue cycles. A second program with no HALT runs to the last word of
// the (reduced, 16-word) memory and stops there. Also checks that start is
// ignored while running.
module sequencer_tb;
  import sca_pkg::*;

  localparam int DEPTH = 16;
  localparam int PC_W  = 4;

  logic            clk = 1'b0, rst_n;
  logic            prog_we, start, busy, done, issue_valid;
  logic [PC_W-1:0] prog_addr, issue_pc;
  instr_t          prog_data, instr;
  instr_t          prog [DEPTH];
  int              checks = 0, failures = 0;

  sequencer #(.IMEM_DEPTH(DEPTH), .PC_W(PC_W)) dut (
    .clk(clk), .rst_n(rst_n), .prog_we(prog_we), .prog_addr(prog_addr),
    .prog_data(prog_data), .start(start), .busy(busy), .done(done),
    .instr(instr), .issue_valid(issue_valid), .issue_pc(issue_pc)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(logic [63:0] got, logic [63:0] want, string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h expected %h at %0t", what, got, want, $time);
    end
  endtask

  function automatic instr_t rand_instr();
    instr_t i;
    i = instr_t'({$urandom, $urandom});
    if (i.op == OP_HALT) i.op = OP_MAC;
    return i;
  endfunction

  task automatic load(int len, logic with_halt);
    for (int k = 0; k < DEPTH; k++) begin
      prog[k] = rand_instr();
      if (with_halt && k == len) prog[k].op = OP_HALT;
      @(negedge clk);
      prog_we = 1'b1; prog_addr = PC_W'(k); prog_data = prog[k];
    end
    @(negedge clk);
    prog_we = 1'b0;
  endtask

  task automatic run(int len);
    int issued = 0;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    @(negedge clk);                        // one cycle to fetch word 0
    for (int k = 0; k < len; k++) begin
      if (k == 2) start = 1'b1;           // ignored while busy
      if (k == 3) start = 1'b0;
      expect_eq(64'(issue_valid), 64'd1, "issue_valid");
      expect_eq(64'(issue_pc), 64'(k), "issue_pc");
      expect_eq(64'(instr), 64'(prog[k]), "instr");
      if (k < len - 1) expect_eq(64'(busy), 64'd1, "busy");
      expect_eq(64'(done), 64'd0, "done early");
      if (issue_valid) issued++;
      @(negedge clk);
    end
    expect_eq(64'(done), 64'd1, "done");
    expect_eq(64'(issue_valid), 64'd0, "issue_valid after");
    expect_eq(64'(instr.op), 64'(OP_NOP), "NOP after");
    expect_eq(64'(issued), 64'(len), "issue cycles");
    @(negedge clk);
    expect_eq(64'(done), 64'd0, "done is a pulse");
    expect_eq(64'(busy), 64'd0, "idle");
    expect_eq(64'(issue_valid), 64'd0, "no restart");
  endtask

  initial begin
    rst_n = 1'b0; prog_we = 1'b0; start = 1'b0; prog_addr = '0; prog_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    expect_eq(64'(instr.op), 64'(OP_NOP), "NOP at reset");
    load(7, 1'b1);  run(7);
    load(11, 1'b1); run(11);
    load(1, 1'b1);  run(1);
    load(DEPTH, 1'b0); run(DEPTH);         // no HALT: stops after the last word
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
