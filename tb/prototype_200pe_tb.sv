// prototype_200pe_tb: the end-to-end stencil job of systolic_top_driver on
// a 20x10 array, 200 PEs, the size estimated for a prototype on two large
// FPGAs. It loads 7 words into every PE through the west edge (20 shifts per
// word), runs two sweeps of x_new = A + B x + C x_E + D x_W + E x_N + F x_S
// and one (a+b)c step, shifts the results out through the east edge, and
// compares all 400 result words with the reference arithmetic. At one a+bc
// or (a+b)c per PE per cycle the array does 400 floating-point operations
// per cycle, 30 Gflops at 75 MHz.
module prototype_200pe_tb;
  import sca_pkg::*;

  localparam int NX         = 20;
  localparam int NY         = 10;
  localparam int IMEM_DEPTH = 256;
  localparam int PC_W       = 8;

  logic            clk, rst_n, prog_we, start, busy, done, issue_valid;
  logic [PC_W-1:0] prog_addr, issue_pc;
  instr_t          prog_data;
  word_t           north_in [NX], south_in [NX], west_in [NY], east_in [NY];
  word_t           north_out [NX], south_out [NX], west_out [NY], east_out [NY];
  word_t           acc_out [NY][NX];

  systolic_top #(.NX(NX), .NY(NY)) dut (.*);

  systolic_top_driver #(.NX(NX), .NY(NY), .IMEM_DEPTH(IMEM_DEPTH), .PC_W(PC_W)) drv (.*);

  // backstop behind the driver's own watchdog (20000 cycles)
  initial begin : backstop
    #1ms;
    $display("backstop timer expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
