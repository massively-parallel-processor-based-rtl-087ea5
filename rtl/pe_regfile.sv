// pe_regfile: the register file (local memory) of one processing element.
//
// Holds the coefficients and variables of the grid points the PE is in
// charge of. Taken together, the register files of all PEs form the
// distributed "computational memory": every PE reads its own file every
// cycle, so memory bandwidth grows with the size of the array.
//
// Three asynchronous read ports feed the ALU operands a, b and c; one
// synchronous write port stores a result at the end of the cycle. A read of
// the word written in the same cycle returns the old value. There is no
// reset; the program loads every word it reads. Port count, depth and
// read/write timing are this design's choices.
//
// Interface: clk; we/waddr/wdata write port; raddr_a/b/c -> rdata_a/b/c.
module pe_regfile #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned AW    = $clog2(DEPTH),
  parameter int unsigned W     = 32
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr_a,
  input  logic [AW-1:0] raddr_b,
  input  logic [AW-1:0] raddr_c,
  output logic [W-1:0]  rdata_a,
  output logic [W-1:0]  rdata_b,
  output logic [W-1:0]  rdata_c
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata_a = mem[raddr_a];
  assign rdata_b = mem[raddr_b];
  assign rdata_c = mem[raddr_c];

endmodule
