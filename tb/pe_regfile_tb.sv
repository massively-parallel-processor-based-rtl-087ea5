// pe_regfile_tb: self-checking test of the PE register file.
//
// Writes random words to random addresses while reading three random
// addresses every cycle, and compares all three read ports with a
// testbench copy of the memory (reads are asynchronous, a write lands at
// the clock edge, a read in the cycle of a write returns the old word).
module pe_regfile_tb;
  localparam int DEPTH = 32;
  localparam int AW    = 5;

  logic          clk = 1'b0;
  logic          we;
  logic [AW-1:0] waddr, ra, rb, rc;
  logic [31:0]   wdata, da, db, dc;
  logic [31:0]   shadow [DEPTH];
  int            checks = 0, failures = 0;

  pe_regfile #(.DEPTH(DEPTH), .AW(AW), .W(32)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
    .raddr_a(ra), .raddr_b(rb), .raddr_c(rc),
    .rdata_a(da), .rdata_b(db), .rdata_c(dc)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(logic [31:0] got, logic [31:0] want, string port);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL port %s: %h expected %h", port, got, want);
    end
  endtask

  initial begin
    we = 1'b0; waddr = '0; wdata = '0; ra = '0; rb = '0; rc = '0;
    // fill every word first
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(i); wdata = $urandom;
      shadow[i] = wdata;
    end
    repeat (5000) begin
      @(negedge clk);
      we = 1'($urandom); waddr = AW'($urandom); wdata = $urandom;
      ra = AW'($urandom); rb = AW'($urandom); rc = (we && $urandom_range(3) == 0) ? waddr : AW'($urandom);
      #1;
      cmp(da, shadow[ra], "a");
      cmp(db, shadow[rb], "b");
      cmp(dc, shadow[rc], "c");
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
