// lvp_table: the predictor cache of the SSg last value predictor.
//
// The table has 2^IDX_BITS direct-mapped lines. Each line holds the
// prediction outcome history of the load instruction mapped to it
// (HIST_BITS wide) and the last value that load fetched (VALUE_W wide).
// There are no tags and no valid bits: a line is shared by every load
// whose PC hashes to it. The index is PC div 4 mod 2^IDX_BITS, that is PC
// bits 2..IDX_BITS+1.
//
// The table has a single port, as in the predictor it belongs to: each
// cycle the line selected by `pc` is read combinationally (rd_hist,
// rd_value, index), and when `we` is high the same line is overwritten
// with {wr_hist, wr_value} at the rising clock edge. A read in the cycle
// after a write returns the new contents.
//
// After reset every line is set to zero, as the predictor is before each
// run. The clearing is done by a sequencer that writes one line per clock
// cycle, so `ready` goes high 2^IDX_BITS cycles after reset is released;
// writes requested before then are ignored. Clearing line by line (rather
// than resetting every bit at once) is this design's choice: it lets the
// array be built as an ordinary single-port RAM.
module lvp_table
  import ssg_lvp_pkg::*;
#(
  parameter int unsigned PC_W      = DEF_PC_W,
  parameter int unsigned IDX_BITS  = DEF_IDX_BITS,
  parameter int unsigned HIST_BITS = DEF_HIST_BITS,
  parameter int unsigned VALUE_W   = DEF_VALUE_W
) (
  input  logic                 clk,
  input  logic                 rst_n,      // asynchronous, active low
  output logic                 ready,      // clearing after reset finished
  // access port
  input  logic [PC_W-1:0]      pc,         // PC of the load being looked up / updated
  output logic [IDX_BITS-1:0]  index,      // line selected by pc
  output logic [HIST_BITS-1:0] rd_hist,    // outcome history of that line
  output logic [VALUE_W-1:0]   rd_value,   // last value of that line
  input  logic                 we,         // overwrite the selected line
  input  logic [HIST_BITS-1:0] wr_hist,
  input  logic [VALUE_W-1:0]   wr_value
);

  localparam int unsigned LINES = 2 ** IDX_BITS;

  typedef struct packed {
    logic [HIST_BITS-1:0] hist;
    logic [VALUE_W-1:0]   value;
  } line_t;

  line_t                mem [LINES];
  logic [IDX_BITS-1:0]  clr_idx;
  logic                 clearing;

  // Hash function: PC div 4 mod 2^n.
  assign index = pc[PC_ALIGN_BITS +: IDX_BITS];

  assign rd_hist  = mem[index].hist;
  assign rd_value = mem[index].value;
  assign ready    = !clearing;

  // Clear sequencer: walks all lines once after reset.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clearing <= 1'b1;
      clr_idx  <= '0;
    end else if (clearing) begin
      clr_idx <= clr_idx + 1'b1;
      if (clr_idx == IDX_BITS'(LINES - 1)) clearing <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (clearing)
      mem[clr_idx] <= '0;
    else if (we)
      mem[index] <= '{hist: wr_hist, value: wr_value};
  end

endmodule
