// ssg_lvp_hist8_tb: the 8-bit-history configuration run on the default
// 14-bit predictor.
//
// Two predictors with 2048 lines receive the same load stream: one at the
// default 14-bit histories, one built with 8-bit histories. The 8-bit
// decision table is filled with random bits; the 14-bit one is written so
// that entry h holds the 8-bit table's bit at h[7:0]. The decisions,
// predicted values and low 8 history bits of the two must then agree on
// every lookup, which shows that a shorter-history setting is just a way of
// programming the default design.
module ssg_lvp_hist8_tb;

  localparam int unsigned PW = 64, IB = 11, VW = 64;
  localparam int unsigned LOADS = 20000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          pred_req, upd_req, prog_we;
  logic [PW-1:0] pred_pc, upd_pc;
  logic [VW-1:0] upd_value;
  logic [13:0]   prog_addr;
  logic          prog_data14, prog_data8;

  logic          rdy_a, gnt_a, busy_a, val_a, prd_a, ugnt_a, udone_a, ucorr_a;
  logic [VW-1:0] value_a;
  logic [13:0]   hist_a;
  logic [IB-1:0] idx_a;
  logic          rdy_b, gnt_b, busy_b, val_b, prd_b, ugnt_b, udone_b, ucorr_b;
  logic [VW-1:0] value_b;
  logic [7:0]    hist_b;
  logic [IB-1:0] idx_b;

  bit rom8 [256];
  int checks = 0, failures = 0;

  ssg_lvp u_a (
    .clk, .rst_n, .ready(rdy_a),
    .pred_req, .pred_pc, .pred_gnt(gnt_a), .pred_busy(busy_a), .pred_valid(val_a),
    .pred_predict(prd_a), .pred_value(value_a), .pred_hist(hist_a), .pred_index(idx_a),
    .upd_req, .upd_pc, .upd_value, .upd_gnt(ugnt_a), .upd_done(udone_a), .upd_correct(ucorr_a),
    .rom_prog_we(prog_we), .rom_prog_addr(prog_addr), .rom_prog_data(prog_data14));

  ssg_lvp #(.PC_W(PW), .IDX_BITS(IB), .HIST_BITS(8), .VALUE_W(VW)) u_b (
    .clk, .rst_n, .ready(rdy_b),
    .pred_req, .pred_pc, .pred_gnt(gnt_b), .pred_busy(busy_b), .pred_valid(val_b),
    .pred_predict(prd_b), .pred_value(value_b), .pred_hist(hist_b), .pred_index(idx_b),
    .upd_req, .upd_pc, .upd_value, .upd_gnt(ugnt_b), .upd_done(udone_b), .upd_correct(ucorr_b),
    .rom_prog_we(prog_we), .rom_prog_addr(prog_addr), .rom_prog_data(prog_data8));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [PW-1:0] site_pc  [32];
    logic [VW-1:0] site_val [32];
    logic [PW-1:0] qpc [$];
    logic [VW-1:0] qval [$];
    int issued, n_pred;
    pred_req = 0; upd_req = 0; pred_pc = '0; upd_pc = '0; upd_value = '0;
    prog_we = 0; prog_addr = '0; prog_data14 = 0; prog_data8 = 0;
    issued = 0; n_pred = 0;
    for (int s = 0; s < 32; s++) begin
      site_pc[s] = PW'(64'h1_2000 + 4 * s * 37);
      site_val[s] = {$urandom, $urandom};
    end
    for (int a = 0; a < 256; a++) rom8[a] = 1'($urandom);
    rom8[255] = 1; rom8[0] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (rdy_a && rdy_b);
    for (int a = 0; a < 16384; a++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 14'(a);
      prog_data14 = rom8[a % 256];
      prog_data8  = rom8[a % 256];
    end
    @(negedge clk) prog_we = 0;
    while (issued < int'(LOADS) || qpc.size() != 0) begin
      int s;
      upd_req = 0;
      if (qpc.size() != 0 && $urandom_range(0, 1) == 0) begin
        upd_req = 1; upd_pc = qpc[0]; upd_value = qval[0];
      end
      s = $urandom_range(0, 31);
      pred_req = issued < int'(LOADS);
      pred_pc = site_pc[s];
      #1;
      check(gnt_a == gnt_b && ugnt_a == ugnt_b, "same grants");
      if (upd_req) begin void'(qpc.pop_front()); void'(qval.pop_front()); end
      if (gnt_a) begin
        // Sites 0..15 are mostly constant, 16..31 mostly changing.
        if ((s < 16) ? ($urandom_range(0, 15) == 0) : ($urandom_range(0, 3) != 0))
          site_val[s] = {$urandom, $urandom};
        qpc.push_back(pred_pc); qval.push_back(site_val[s]);
        issued++;
      end
      @(posedge clk); #1;
      if (val_a) begin
        check(val_b && prd_a == prd_b, "same decision");
        check(value_a == value_b && hist_a[7:0] == hist_b && idx_a == idx_b, "same line contents");
        if (prd_a) n_pred++;
      end
      if (udone_a) check(udone_b && ucorr_a == ucorr_b, "same update outcome");
      @(negedge clk);
    end
    pred_req = 0; upd_req = 0;
    $display("lookups=%0d predictions=%0d", issued, n_pred);
    check(n_pred > 0 && n_pred < issued, "both decisions occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
