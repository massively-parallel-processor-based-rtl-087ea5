// systolic_top_full_tb: end-to-end test of the systolic array processor at its
// default size (the 2x2 array; the top's parameters are left alone).
// The host program, data, reference and checks are in systolic_top_driver.
module systolic_top_full_tb;
  import sca_pkg::*;

  localparam int NX         = 2;
  localparam int NY         = 2;
  localparam int IMEM_DEPTH = 256;
  localparam int PC_W       = 8;

  logic            clk, rst_n, prog_we, start, busy, done, issue_valid;
  logic [PC_W-1:0] prog_addr, issue_pc;
  instr_t          prog_data;
  word_t           north_in [NX], south_in [NX], west_in [NY], east_in [NY];
  word_t           north_out [NX], south_out [NX], west_out [NY], east_out [NY];
  word_t           acc_out [NY][NX];

  systolic_top dut (.*);

  systolic_top_driver #(.NX(NX), .NY(NY), .IMEM_DEPTH(IMEM_DEPTH), .PC_W(PC_W)) drv (.*);
endmodule
