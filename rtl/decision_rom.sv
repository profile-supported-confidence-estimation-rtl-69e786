// decision_rom: the decision logic of the SSg(comp) confidence estimator.
//
// A 2^HIST_BITS x 1-bit table indexed by a prediction outcome history. An
// entry holds 1 when that history pattern should trigger a prediction and
// 0 when it should not. Which patterns get a 1 is decided off-line from
// profile runs: a pattern is selected when the fraction of correct last
// value predictions that followed it reaches a chosen threshold (high for
// a processor that recovers by re-fetching, lower for one that only
// re-executes dependent instructions).
//
// The table is read combinationally: `predict` follows `hist` in the same
// cycle, so the table lookup and this lookup fit in one cycle together.
// The contents are written through a one-bit programming port (prog_we,
// prog_addr, prog_data, written at the rising clock edge); the table is
// meant to be written once, before use, and then only read. The
// programming port and the absence of a reset (its contents are
// undefined until written) are this design's choices; the predictor
// itself treats the table as a read-only memory.
module decision_rom
  import ssg_lvp_pkg::*;
#(
  parameter int unsigned HIST_BITS = DEF_HIST_BITS
) (
  input  logic                 clk,
  input  logic [HIST_BITS-1:0] hist,
  output logic                 predict,
  input  logic                 prog_we,
  input  logic [HIST_BITS-1:0] prog_addr,
  input  logic                 prog_data
);

  localparam int unsigned ENTRIES = 2 ** HIST_BITS;

  logic rom [ENTRIES];

  assign predict = rom[hist];

  always_ff @(posedge clk) begin
    if (prog_we) rom[prog_addr] <= prog_data;
  end

endmodule
