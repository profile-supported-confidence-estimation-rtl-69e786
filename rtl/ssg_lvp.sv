// ssg_lvp: SSg(comp) last value predictor with a prediction outcome
// history confidence estimator.
//
// A load's PC selects one line of a direct-mapped table (lvp_table, PC
// bits 2..IDX_BITS+1). The line holds the value that load fetched last
// time, which is the predicted value, and the load's recent prediction
// outcome history. The history indexes a 2^HIST_BITS x 1-bit decision
// table (decision_rom), programmed from profiles, whose bit says whether
// the prediction should be used. When the load's true value is known the
// line is updated (history_update): a 1 is shifted into the history if the
// true value equals the stored last value, a 0 otherwise, and the true
// value replaces the stored one. Histories are updated for every load,
// whether or not a prediction was made for it, since they record how a
// last value prediction would have fared.
//
// Interface and timing
//   * Lookup: hold pred_req with pred_pc. pred_gnt (combinational) says the
//     lookup is accepted in this cycle. One cycle later pred_valid is high
//     with pred_value, pred_predict (use it / don't) and the history and
//     line index that produced them. One lookup per cycle at most.
//   * Update: hold upd_req with upd_pc and upd_value (the true value).
//     upd_gnt (combinational) says the update is accepted; the line is
//     written at the end of that cycle. One cycle later upd_done is high
//     with upd_correct, the outcome shifted into the history.
//   * The table has one port. An update occupies it for a cycle, during
//     which no lookup can be made (pred_gnt stays low, pred_busy is high);
//     updates win over lookups. Requests are not accepted while the table
//     is being cleared after reset (ready low, 2^IDX_BITS cycles).
//   * A lookup of a line whose older load has not been updated yet simply
//     uses the information the line holds; lines are not locked.
//   * rom_prog_*: writes one bit of the decision table per cycle; the table
//     must be fully written before predictions are used.
//
// Following the description: the table organisation (no tags, no valid
// bits, direct mapped), the index function, the update rule and history
// bit order, the 1-bit decision table indexed by the history, one
// prediction per cycle and the busy cycle taken by an update, clearing
// all lines before a run. This design's own choices: the request/grant
// handshake, the registered outputs (one cycle from request to result),
// update-over-lookup priority, and the line-by-line clearing.
module ssg_lvp
  import ssg_lvp_pkg::*;
#(
  parameter int unsigned PC_W      = DEF_PC_W,
  parameter int unsigned IDX_BITS  = DEF_IDX_BITS,
  parameter int unsigned HIST_BITS = DEF_HIST_BITS,
  parameter int unsigned VALUE_W   = DEF_VALUE_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic                 ready,
  // prediction lookup
  input  logic                 pred_req,
  input  logic [PC_W-1:0]      pred_pc,
  output logic                 pred_gnt,
  output logic                 pred_busy,
  output logic                 pred_valid,
  output logic                 pred_predict,
  output logic [VALUE_W-1:0]   pred_value,
  output logic [HIST_BITS-1:0] pred_hist,
  output logic [IDX_BITS-1:0]  pred_index,
  // update with the true load value
  input  logic                 upd_req,
  input  logic [PC_W-1:0]      upd_pc,
  input  logic [VALUE_W-1:0]   upd_value,
  output logic                 upd_gnt,
  output logic                 upd_done,
  output logic                 upd_correct,
  // decision table programming
  input  logic                 rom_prog_we,
  input  logic [HIST_BITS-1:0] rom_prog_addr,
  input  logic                 rom_prog_data
);

  table_op_e             op;
  logic [PC_W-1:0]       acc_pc;
  logic [IDX_BITS-1:0]   index;
  logic [HIST_BITS-1:0]  rd_hist, new_hist;
  logic [VALUE_W-1:0]    rd_value;
  logic                  correct, rom_predict;

  // Port arbitration.
  always_comb begin
    if (!ready)       op = OP_CLEAR;
    else if (upd_req) op = OP_UPDATE;
    else if (pred_req) op = OP_LOOKUP;
    else              op = OP_IDLE;
  end

  assign upd_gnt   = (op == OP_UPDATE);
  assign pred_gnt  = (op == OP_LOOKUP);
  assign pred_busy = pred_req && !pred_gnt;
  assign acc_pc    = (op == OP_UPDATE) ? upd_pc : pred_pc;

  lvp_table #(
    .PC_W(PC_W), .IDX_BITS(IDX_BITS), .HIST_BITS(HIST_BITS), .VALUE_W(VALUE_W)
  ) u_table (
    .clk, .rst_n, .ready,
    .pc       (acc_pc),
    .index    (index),
    .rd_hist  (rd_hist),
    .rd_value (rd_value),
    .we       (upd_gnt),
    .wr_hist  (new_hist),
    .wr_value (upd_value)
  );

  history_update #(
    .HIST_BITS(HIST_BITS), .VALUE_W(VALUE_W)
  ) u_hist (
    .old_hist     (rd_hist),
    .cached_value (rd_value),
    .true_value   (upd_value),
    .correct      (correct),
    .new_hist     (new_hist)
  );

  decision_rom #(
    .HIST_BITS(HIST_BITS)
  ) u_rom (
    .clk,
    .hist      (rd_hist),
    .predict   (rom_predict),
    .prog_we   (rom_prog_we),
    .prog_addr (rom_prog_addr),
    .prog_data (rom_prog_data)
  );

  // Registered results.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pred_valid   <= 1'b0;
      pred_predict <= 1'b0;
      pred_value   <= '0;
      pred_hist    <= '0;
      pred_index   <= '0;
      upd_done     <= 1'b0;
      upd_correct  <= 1'b0;
    end else begin
      pred_valid <= pred_gnt;
      upd_done   <= upd_gnt;
      if (pred_gnt) begin
        pred_predict <= rom_predict;
        pred_value   <= rd_value;
        pred_hist    <= rd_hist;
        pred_index   <= index;
      end
      if (upd_gnt) upd_correct <= correct;
    end
  end

  // The single port serves at most one operation per cycle. (The assertions
  // sample rst_n synchronously through disable iff, while the flops reset
  // asynchronously; lint tools flag that mix, which is harmless here.)
  a_one_op: assert property (@(posedge clk) disable iff (!rst_n) !(pred_gnt && upd_gnt));
  // Nothing is accepted while the table is being cleared.
  a_no_acc_clear: assert property (@(posedge clk) disable iff (!rst_n)
                                   !ready |-> !(pred_gnt || upd_gnt));

endmodule
