// ssg_lvp_table41_tb: the predictor with 4-bit outcome histories,
// programmed from a per-pattern predictability profile at several
// confidence thresholds.
//
// The profile is the 16-entry 4-bit table of last value predictability and
// pattern occurrence measured over SPECint95 (values in tenths of a
// percent below). For each threshold (96.6%, 86%, 65% and 50%) the decision
// table gets a 1 for every pattern whose predictability reaches the
// threshold. A single load is then driven through update sequences that
// put every one of the 16 histories into its line (four updates, oldest
// outcome first; an outcome of 1 is an update with the stored value, 0 one
// with a new value), and a lookup after each checks the history, the last
// value and the decision bit. The fraction of loads the profile says would
// be predicted, and their expected accuracy, are printed per threshold;
// at 96.6% only pattern 1111 predicts, covering 38.3% of loads.
module ssg_lvp_table41_tb;

  localparam int unsigned PW = 32, IB = 4, HB = 4, VW = 64;

  // Predictability and occurrence per pattern 0000..1111, in 0.1 %.
  localparam int PRED [16] = '{69, 269, 191, 499, 343, 336, 449, 594,
                               242, 463, 668, 661, 531, 572, 523, 966};
  localparam int OCC  [16] = '{322, 27, 29, 16, 29, 19, 13, 22,
                               27, 18, 19, 19, 16, 19, 22, 383};
  localparam int THR  [4]  = '{966, 860, 650, 500};
  localparam int NSEL [4]  = '{1, 1, 3, 7};

  logic          clk = 0, rst_n = 0, ready;
  logic          pred_req, pred_gnt, pred_busy, pred_valid, pred_predict;
  logic [PW-1:0] pred_pc, upd_pc;
  logic [VW-1:0] pred_value, upd_value;
  logic [HB-1:0] pred_hist, rom_prog_addr;
  logic [IB-1:0] pred_index;
  logic          upd_req, upd_gnt, upd_done, upd_correct;
  logic          rom_prog_we, rom_prog_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ssg_lvp #(.PC_W(PW), .IDX_BITS(IB), .HIST_BITS(HB), .VALUE_W(VW)) dut (
    .clk, .rst_n, .ready,
    .pred_req, .pred_pc, .pred_gnt, .pred_busy, .pred_valid, .pred_predict,
    .pred_value, .pred_hist, .pred_index,
    .upd_req, .upd_pc, .upd_value, .upd_gnt, .upd_done, .upd_correct,
    .rom_prog_we, .rom_prog_addr, .rom_prog_data);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [VW-1:0] last;

  task automatic update(input bit outcome);
    @(negedge clk);
    upd_req = 1; upd_pc = 32'h0001_2344;
    upd_value = outcome ? last : last + 64'h1_0001;
    #1 check(upd_gnt, "update granted");
    last = upd_value;
    @(posedge clk); #1;
    check(upd_done && upd_correct == outcome, "update outcome");
    @(negedge clk) upd_req = 0;
  endtask

  initial begin
    pred_req = 0; pred_pc = 32'h0001_2344; upd_req = 0; upd_pc = '0; upd_value = '0;
    rom_prog_we = 0; rom_prog_addr = '0; rom_prog_data = 0;
    last = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (ready);
    for (int t = 0; t < 4; t++) begin
      int nsel, cov, acc_num;
      nsel = 0; cov = 0; acc_num = 0;
      for (int h = 0; h < 16; h++) begin
        @(negedge clk);
        rom_prog_we = 1; rom_prog_addr = HB'(h); rom_prog_data = (PRED[h] >= THR[t]);
        if (PRED[h] >= THR[t]) begin
          nsel++; cov += OCC[h]; acc_num += OCC[h] * PRED[h];
        end
      end
      @(negedge clk) rom_prog_we = 0;
      check(nsel == NSEL[t], "number of selected patterns");
      if (t == 0) check(cov == 383, "96.6% threshold predicts 38.3% of loads");
      $display("threshold %0d.%0d%%: %0d patterns, %0d.%0d%% of loads predicted, expected accuracy %0d.%0d%%",
               THR[t] / 10, THR[t] % 10, nsel, cov / 10, cov % 10,
               acc_num / cov / 10, acc_num / cov % 10);
      for (int h = 0; h < 16; h++) begin
        for (int b = 3; b >= 0; b--) update(h[b]);
        @(negedge clk) pred_req = 1;
        #1 check(pred_gnt, "lookup granted");
        @(posedge clk); #1;
        check(pred_valid && pred_hist == HB'(h), "history pattern in the line");
        check(pred_value == last, "predicted value is the last value");
        check(pred_predict == (PRED[h] >= THR[t]), "decision follows the profile");
        @(negedge clk) pred_req = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
