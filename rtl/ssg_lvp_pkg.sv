// ssg_lvp_pkg: shared constants and types of the SSg(comp) last value predictor.
//
// The default sizes are those of the predictor as it is evaluated in its
// main configuration: 2048 table lines (11 index bits), 14-bit prediction
// outcome histories and 64-bit load values. With these sizes the table
// holds 2048 * (14 + 64) = 159,744 state bits and the decision ROM
// 2^14 = 16,384 bits. The width of the program counter is this design's
// own choice (a 64-bit machine); only PC bits 2..IDX_BITS+1 are used.
//
// table_op_e names what the single table port does in a cycle. Clearing
// after reset, the update of a retired load, and a prediction lookup
// share that port, in that order of priority.
package ssg_lvp_pkg;

  localparam int unsigned DEF_IDX_BITS  = 11;
  localparam int unsigned DEF_HIST_BITS = 14;
  localparam int unsigned DEF_VALUE_W   = 64;
  localparam int unsigned DEF_PC_W      = 64;

  // Instructions are word aligned: PC bits 1..0 are always zero and are
  // dropped by the index function (PC div 4 mod 2^n).
  localparam int unsigned PC_ALIGN_BITS = 2;

  typedef enum logic [1:0] {
    OP_IDLE   = 2'd0,
    OP_CLEAR  = 2'd1,
    OP_UPDATE = 2'd2,
    OP_LOOKUP = 2'd3
  } table_op_e;

endpackage
