// sca_pkg: types and constants shared by the systolic computational-memory
// array (PE, PE array, sequencer, top).
//
// Every PE of the array executes the same instruction in the same cycle.
// One instruction names an ALU operation, a source for each of the three
// ALU inputs (a, b, c), the register-file addresses those sources use, and
// the destinations the result is written to: the accumulator, one register
// file word and any of the four communication registers (N, S, W, E).
//
// The ALU operations a+b*c and (a+b)*c and the set of sources (register file,
// the four neighbours' communication registers, the accumulator) follow the
// processor described for the fractional step method. The encoding, the
// constant sources ZERO and ONE, the PASS operation used for exact moves and
// the HALT operation are this design's own choices.
package sca_pkg;

  localparam int unsigned WORD_W = 32;           // IEEE-754 single precision

  typedef logic [WORD_W-1:0] word_t;

  // ALU operations
  typedef enum logic [2:0] {
    OP_NOP  = 3'd0,   // nothing is written
    OP_MAC  = 3'd1,   // a + b*c
    OP_AMUL = 3'd2,   // (a + b)*c
    OP_PASS = 3'd3,   // c, bit-exact (moves, shift-register loading)
    OP_HALT = 3'd7    // end of program; seen only by the sequencer
  } alu_op_e;

  // Operand sources selected by the PE's operand multiplexer
  typedef enum logic [2:0] {
    SRC_RF   = 3'd0,  // register file word (per-operand address)
    SRC_N    = 3'd1,  // north neighbour's S-register
    SRC_S    = 3'd2,  // south neighbour's N-register
    SRC_W    = 3'd3,  // west neighbour's E-register
    SRC_E    = 3'd4,  // east neighbour's W-register
    SRC_ACC  = 3'd5,  // own accumulator
    SRC_ZERO = 3'd6,  // +0.0
    SRC_ONE  = 3'd7   // +1.0
  } src_e;

  localparam int unsigned RF_AW = 5;             // register file address width
  typedef logic [RF_AW-1:0] rf_addr_t;

  typedef struct packed {
    alu_op_e  op;
    src_e     src_a;
    src_e     src_b;
    src_e     src_c;
    rf_addr_t addr_a;
    rf_addr_t addr_b;
    rf_addr_t addr_c;
    rf_addr_t addr_d;   // register file write address
    logic     wr_rf;
    logic     wr_acc;
    logic     wr_n;
    logic     wr_s;
    logic     wr_w;
    logic     wr_e;
  } instr_t;


  localparam word_t FP_ZERO = 32'h0000_0000;
  localparam word_t FP_ONE  = 32'h3F80_0000;

endpackage
