// systolic_top: systolic array processor for difference schemes.
//
// A sequencer broadcasts one instruction per cycle to an NX x NY mesh of
// floating-point PEs. Each PE owns a register file (its share of the
// distributed memory), an accumulator, a three-input ALU (a+b*c or
// (a+b)*c, one single-precision adder and one multiplier) and four
// communication registers read by its neighbours. A stencil update
//   x_new(i,j) = A + B x(i,j) + C x(i+1,j) + D x(i-1,j) + E x(i,j+1) + F x(i,j-1)
// - the form to which all three steps of the fractional step method reduce -
// takes one instruction to publish x to the four communication registers
// and one multiply-add per term, executed by every PE at once.
//
// Interface:
//   prog_we/prog_addr/prog_data  write the program (while idle)
//   start, busy, done            run it (see sequencer for timing)
//   issue_valid, issue_pc        which program word the array executes in
//                                this cycle (for the host to time boundary data)
//   *_in / *_out                 the array's edge: inputs stand in for the
//                                missing neighbours of the edge PEs, outputs
//                                are the edge PEs' outward communication registers
//   acc_out                      every PE's accumulator, for observation
// The default size is the 2x2 array of the processor's block diagram.
module systolic_top
  import sca_pkg::*;
#(
  parameter int unsigned NX         = 2,
  parameter int unsigned NY         = 2,
  parameter int unsigned RF_DEPTH   = 32,
  parameter int unsigned IMEM_DEPTH = 256,
  parameter int unsigned PC_W       = $clog2(IMEM_DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            prog_we,
  input  logic [PC_W-1:0] prog_addr,
  input  instr_t          prog_data,
  input  logic            start,
  output logic            busy,
  output logic            done,
  output logic            issue_valid,
  output logic [PC_W-1:0] issue_pc,
  input  word_t           north_in  [NX],
  input  word_t           south_in  [NX],
  input  word_t           west_in   [NY],
  input  word_t           east_in   [NY],
  output word_t           north_out [NX],
  output word_t           south_out [NX],
  output word_t           west_out  [NY],
  output word_t           east_out  [NY],
  output word_t           acc_out   [NY][NX]
);

  instr_t instr;

  sequencer #(.IMEM_DEPTH(IMEM_DEPTH), .PC_W(PC_W)) u_seq (
    .clk        (clk),
    .rst_n      (rst_n),
    .prog_we    (prog_we),
    .prog_addr  (prog_addr),
    .prog_data  (prog_data),
    .start      (start),
    .busy       (busy),
    .done       (done),
    .instr      (instr),
    .issue_valid(issue_valid),
    .issue_pc   (issue_pc)
  );

  pe_array #(.NX(NX), .NY(NY), .RF_DEPTH(RF_DEPTH)) u_array (
    .clk      (clk),
    .rst_n    (rst_n),
    .instr    (instr),
    .north_in (north_in),
    .south_in (south_in),
    .west_in  (west_in),
    .east_in  (east_in),
    .north_out(north_out),
    .south_out(south_out),
    .west_out (west_out),
    .east_out (east_out),
    .acc_out  (acc_out)
  );

endmodule
