// sequencer: the array controller that broadcasts one instruction per cycle.
//
// All PEs of the array run the same schedule in lock step, so one
// controller fetches the schedule and hands every PE the same instruction.
// The host first writes the program into the instruction memory through
// prog_we/prog_addr/prog_data while the sequencer is idle, then pulses
// start. The sequencer then fetches words 0, 1, 2, ... one per cycle and
// presents each on `instr` for exactly one cycle (issue_valid high,
// issue_pc its address) until it fetches an OP_HALT word or runs past the
// last word. It then returns to idle, pulses done for one cycle and drives
// NOP. A program of L words before its HALT therefore occupies the array
// for exactly L cycles. Timing: the edge that samples start loads pc = 0;
// word 0 is fetched and presented from the next edge on; done (and busy
// low) follows in the cycle after the last word is presented.
//
// The lock-step broadcast follows the processor's description; the
// instruction memory, its size, the host write port, start/done and the
// halt word are this design's own choices (the controller itself is not
// described).
module sequencer
  import sca_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 256,
  parameter int unsigned PC_W       = $clog2(IMEM_DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  // host program port
  input  logic            prog_we,
  input  logic [PC_W-1:0] prog_addr,
  input  instr_t          prog_data,
  // control
  input  logic            start,
  output logic            busy,
  output logic            done,
  // broadcast to the array
  output instr_t          instr,
  output logic            issue_valid,
  output logic [PC_W-1:0] issue_pc
);

  localparam instr_t NOP_INSTR = '{op: OP_NOP, src_a: SRC_ZERO, src_b: SRC_ZERO,
                                   src_c: SRC_ZERO, default: '0};

  instr_t          imem [IMEM_DEPTH];
  logic [PC_W-1:0] pc;
  instr_t          fetched;
  logic            last;
  logic            ran_out;   // the last memory word has been issued

  always_ff @(posedge clk) begin
    if (prog_we && !busy) imem[prog_addr] <= prog_data;
  end

  assign fetched = imem[pc];
  assign last    = (pc == PC_W'(IMEM_DEPTH - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      done        <= 1'b0;
      pc          <= '0;
      ran_out     <= 1'b0;
      instr       <= NOP_INSTR;
      issue_valid <= 1'b0;
      issue_pc    <= '0;
    end else begin
      done        <= 1'b0;
      instr       <= NOP_INSTR;
      issue_valid <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy    <= 1'b1;
          pc      <= '0;
          ran_out <= 1'b0;
        end
      end else if (fetched.op == OP_HALT || ran_out) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        instr       <= fetched;
        issue_valid <= 1'b1;
        issue_pc    <= pc;
        pc          <= pc + 1'b1;
        if (last) ran_out <= 1'b1;
      end
    end
  end

  // the program must not change under a running sequencer
  a_no_prog_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                         !(prog_we && busy))
    else $error("sequencer: program memory written while running");

endmodule
