// ssg_lvp_tb: end-to-end test of the SSg(comp) last value predictor at its
// default sizes (2048 lines, 14-bit histories, 64-bit values).
//
// The test keeps its own model of the table (history and last value per
// line) and of the decision table, and compares every lookup result
// (pred_value, pred_predict, pred_hist, pred_index) and every update
// outcome (upd_correct) with it, one cycle after the request is granted.
//
// Sequence: reset; lookups and updates requested during the clearing must
// not be granted, and `ready` must rise exactly 2048 cycles after reset.
// The decision table is then programmed: the all-ones history and histories
// with at least 11 ones predict, everything else does not, plus a few
// random flips. A stream of loads from 48 load sites follows. Some sites
// always load the same value, some change rarely, some alternate, some are
// random, and some have PCs that differ only above the index bits, so they
// share a line with another site. Each granted lookup queues the load's
// update, which is requested 1 to 8 cycles later and held until granted.
//
// Counted mechanisms (each must occur): lookups granted, lookups refused
// because an update holds the port, requests refused during clearing,
// predictions made and withheld, correct and incorrect update outcomes,
// lookups of a line whose previous load is still waiting for its update,
// lookups of aliased lines, and histories that reached all ones. The
// accuracy, coverage and potential of the stream are printed as well.
module ssg_lvp_tb;
  import ssg_lvp_pkg::*;

  localparam int unsigned PW = DEF_PC_W, IB = DEF_IDX_BITS, HB = DEF_HIST_BITS, VW = DEF_VALUE_W;
  localparam int unsigned L = 2 ** IB, R = 2 ** HB;
  localparam int unsigned SITES = 48;
  localparam int unsigned LOADS = 20000;

  logic          clk = 0, rst_n = 0, ready;
  logic          pred_req, pred_gnt, pred_busy, pred_valid, pred_predict;
  logic [PW-1:0] pred_pc, upd_pc;
  logic [VW-1:0] pred_value, upd_value;
  logic [HB-1:0] pred_hist, rom_prog_addr;
  logic [IB-1:0] pred_index;
  logic          upd_req, upd_gnt, upd_done, upd_correct;
  logic          rom_prog_we, rom_prog_data;

  always #5 clk = ~clk;

  ssg_lvp dut (
    .clk, .rst_n, .ready,
    .pred_req, .pred_pc, .pred_gnt, .pred_busy, .pred_valid, .pred_predict,
    .pred_value, .pred_hist, .pred_index,
    .upd_req, .upd_pc, .upd_value, .upd_gnt, .upd_done, .upd_correct,
    .rom_prog_we, .rom_prog_addr, .rom_prog_data);

  // Reference model.
  logic [HB-1:0] m_hist [L];
  logic [VW-1:0] m_val  [L];
  bit            m_rom  [R];
  int            m_pending [L];   // updates queued but not yet applied, per line

  // Load sites.
  logic [PW-1:0] site_pc   [SITES];
  int            site_kind [SITES];
  logic [VW-1:0] site_cur  [SITES];
  logic [VW-1:0] site_alt  [SITES];

  typedef struct {
    logic [PW-1:0] pc;
    logic [VW-1:0] value;
    longint        due;
    bit            predicted;
  } load_t;
  load_t q[$];

  int checks = 0, failures = 0;
  longint cyc = 0;
  int n_busy = 0, n_clear_refused = 0, n_predict = 0, n_nopredict = 0;
  int n_corr = 0, n_incorr = 0, n_stale = 0, n_alias = 0, n_allones = 0;
  int p_corr = 0, p_incorr = 0, np_corr = 0, np_incorr = 0;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  function automatic int popcount(input logic [HB-1:0] h);
    int c = 0;
    for (int i = 0; i < int'(HB); i++) c += int'(h[i]);
    return c;
  endfunction

  function automatic logic [IB-1:0] idx_of(input logic [PW-1:0] p);
    return IB'(p >> 2);
  endfunction

  function automatic logic [VW-1:0] next_value(input int s);
    case (site_kind[s])
      0: ;                                              // constant
      1: if ($urandom_range(0, 31) == 0) site_cur[s] = {$urandom, $urandom};  // rarely changes
      2: begin logic [VW-1:0] t = site_cur[s]; site_cur[s] = site_alt[s]; site_alt[s] = t; end
      default: site_cur[s] = {$urandom, $urandom};      // random
    endcase
    return site_cur[s];
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int issued = 0, c;
    bit exp_valid, exp_pred, exp_done, exp_corr;
    logic [VW-1:0] exp_value;
    logic [HB-1:0] exp_hist;
    logic [IB-1:0] exp_index;
    bit hist_bad;

    pred_req = 0; pred_pc = '0; upd_req = 0; upd_pc = '0; upd_value = '0;
    rom_prog_we = 0; rom_prog_addr = '0; rom_prog_data = 0;
    for (int i = 0; i < int'(L); i++) begin m_hist[i] = '0; m_val[i] = '0; m_pending[i] = 0; end

    // Load sites: the last 8 alias with sites 0..7 (same index, other PC).
    for (int s = 0; s < int'(SITES); s++) begin
      if (s >= 40) site_pc[s] = site_pc[s - 40] + PW'(L * 4 * (s - 39));
      else         site_pc[s] = PW'(32'h0040_0000 + 4 * ($urandom_range(0, 255) * 8 + s));
      site_kind[s] = s % 4;
      site_cur[s]  = {$urandom, $urandom};
      site_alt[s]  = {$urandom, $urandom};
    end

    // Reset, then requests during the clearing must be refused.
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    pred_req = 1; pred_pc = site_pc[0]; upd_req = 1; upd_pc = site_pc[1]; upd_value = 64'h55;
    c = 0;
    while (!ready && c < 3 * int'(L)) begin
      #1;
      if (pred_gnt || upd_gnt) begin failures++; $display("FAIL grant during clearing"); end
      else n_clear_refused++;
      @(negedge clk);
      c++;
    end
    check(c == int'(L), "ready rises 2^IDX_BITS cycles after reset");
    pred_req = 0; upd_req = 0;

    // Program the decision table.
    for (int a = 0; a < int'(R); a++) begin
      bit b;
      b = (popcount(HB'(a)) >= 11);
      if ($urandom_range(0, 63) == 0) b = !b;
      if (a == int'(R) - 1) b = 1;
      if (a == 0) b = 0;
      m_rom[a] = b;
      @(negedge clk);
      rom_prog_we = 1; rom_prog_addr = HB'(a); rom_prog_data = b;
    end
    @(negedge clk) rom_prog_we = 0;

    // Load stream.
    exp_valid = 0; exp_done = 0;
    while (issued < int'(LOADS) || q.size() != 0) begin
      int s;
      // Drive requests for this cycle (we are just after a negedge).
      upd_req = 0;
      if (q.size() != 0 && q[0].due <= cyc) begin
        upd_req = 1; upd_pc = q[0].pc; upd_value = q[0].value;
      end
      pred_req = (issued < int'(LOADS)) && ($urandom_range(0, 3) != 0);
      s = $urandom_range(0, SITES - 1);
      pred_pc = site_pc[s];
      #1;
      // Grants and the expected results.
      check(!(pred_gnt && upd_gnt), "one operation per cycle");
      check(pred_busy == (pred_req && upd_req), "busy when an update holds the port");
      check(upd_gnt == upd_req && pred_gnt == (pred_req && !upd_req), "grant priority");
      if (pred_busy) n_busy++;
      if (upd_gnt) begin
        logic [IB-1:0] li;
        li = idx_of(upd_pc);
        exp_done = 1;
        exp_corr = (m_val[li] == upd_value);
        if (exp_corr) n_corr++; else n_incorr++;
        if (q[0].predicted) begin if (exp_corr) p_corr++; else p_incorr++; end
        else begin if (exp_corr) np_incorr++; else np_corr++; end
        m_hist[li] = HB'({m_hist[li], exp_corr});
        m_val[li]  = upd_value;
        m_pending[li]--;
        if (m_hist[li] == '1) n_allones++;
        void'(q.pop_front());
      end else exp_done = 0;
      if (pred_gnt) begin
        load_t ld;
        logic [IB-1:0] li;
        li = idx_of(pred_pc);
        exp_valid = 1;
        exp_index = li;
        exp_hist  = m_hist[li];
        exp_value = m_val[li];
        exp_pred  = m_rom[m_hist[li]];
        if (m_pending[li] != 0) n_stale++;
        if (s >= 40 || s < 8) n_alias++;
        if (exp_pred) n_predict++; else n_nopredict++;
        ld.pc = pred_pc; ld.value = next_value(s);
        ld.due = cyc + longint'($urandom_range(1, 8)); ld.predicted = exp_pred;
        q.push_back(ld);
        m_pending[li]++;
        issued++;
      end else exp_valid = 0;
      @(posedge clk); #1;
      // Results, one cycle after the grant.
      check(pred_valid == exp_valid, "pred_valid one cycle after grant");
      if (exp_valid) begin
        check(pred_value == exp_value, "predicted value is the line's last value");
        check(pred_hist == exp_hist && pred_index == exp_index, "history and index");
        if (failures < 3 && !(pred_hist == exp_hist && pred_index == exp_index)) $display("hist %h/%h idx %h/%h", pred_hist, exp_hist, pred_index, exp_index);
        check(pred_predict == exp_pred, "decision bit");
      end
      check(upd_done == exp_done, "upd_done one cycle after grant");
      if (exp_done) check(upd_correct == exp_corr, "update outcome");
      @(negedge clk);
    end

    // Final sweep: every line of the model against the hardware, via lookups.
    hist_bad = 0;
    for (int i = 0; i < int'(L); i++) begin
      pred_req = 1; pred_pc = PW'(i * 4); upd_req = 0;
      @(posedge clk); #1;
      checks++;
      if (!(pred_valid && pred_value == m_val[i] && pred_hist == m_hist[i])) begin
        failures++;
        if (!hist_bad) $display("FAIL final contents of line %0d", i);
        hist_bad = 1;
      end
      @(negedge clk);
    end
    pred_req = 0;

    $display("mechanisms: lookups=%0d busy=%0d clear_refused=%0d predict=%0d nopredict=%0d",
             issued, n_busy, n_clear_refused, n_predict, n_nopredict);
    $display("mechanisms: outcome1=%0d outcome0=%0d stale_line=%0d alias=%0d allones=%0d",
             n_corr, n_incorr, n_stale, n_alias, n_allones);
    if (p_corr + p_incorr > 0 && p_corr + np_incorr > 0)
      $display("metrics: POT=%0.3f ACC=%0.3f COV=%0.3f",
               real'(p_corr + np_incorr) / real'(issued),
               real'(p_corr) / real'(p_corr + p_incorr),
               real'(p_corr) / real'(p_corr + np_incorr));
    check(issued > 0, "lookups happened");
    check(n_busy > 0, "lookup refused by update");
    check(n_clear_refused > 0, "requests refused while clearing");
    check(n_predict > 0, "predictions made");
    check(n_nopredict > 0, "predictions withheld");
    check(n_corr > 0 && n_incorr > 0, "both update outcomes");
    check(n_stale > 0, "lookup before previous update of the line");
    check(n_alias > 0, "aliased lines used");
    check(n_allones > 0, "all-ones history reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
