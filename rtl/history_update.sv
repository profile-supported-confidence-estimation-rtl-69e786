// history_update: next prediction outcome history of a table line.
//
// When the true value of a load is known, it is compared with the last
// value held in the load's table line. Equal means a last value
// prediction would have been (or was) correct, and a 1 is shifted into
// the history; different shifts in a 0. The oldest bit falls out. The
// newest outcome sits in bit 0, so a history printed MSB first reads
// oldest to newest (pattern 0001: three failures, then a success).
//
// Purely combinational; the caller writes new_hist and the true value
// back into the same line.
module history_update
  import ssg_lvp_pkg::*;
#(
  parameter int unsigned HIST_BITS = DEF_HIST_BITS,
  parameter int unsigned VALUE_W   = DEF_VALUE_W
) (
  input  logic [HIST_BITS-1:0] old_hist,
  input  logic [VALUE_W-1:0]   cached_value,  // last value stored in the line
  input  logic [VALUE_W-1:0]   true_value,    // value the load actually fetched
  output logic                 correct,       // last value would have been right
  output logic [HIST_BITS-1:0] new_hist
);

  always_comb begin
    correct = (cached_value == true_value);
    if (HIST_BITS > 1)
      new_hist = {old_hist[HIST_BITS-2:0], correct};
    else
      new_hist = HIST_BITS'(correct);
  end

endmodule
