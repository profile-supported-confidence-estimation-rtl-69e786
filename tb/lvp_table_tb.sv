// lvp_table_tb: self-checking test of the predictor table.
//
// Uses a reduced table (64 lines, 5-bit histories, 32-bit PC) so that the
// random phase revisits lines often. Checks: `ready` rises exactly 2^6
// cycles after reset, with writes during that time ignored; every line
// reads zero after clearing even though the array starts with random
// contents; the index equals PC bits 2..7 and ignores the other bits, so
// PCs that differ only above bit 7 share a line; reads return the last
// write to the line, also in the cycle right after the write.
module lvp_table_tb;

  localparam int unsigned PW = 32, IB = 6, HB = 5, VW = 64;
  localparam int unsigned L = 2 ** IB;

  logic          clk = 0, rst_n = 0, ready, we;
  logic [PW-1:0] pc;
  logic [IB-1:0] index;
  logic [HB-1:0] rd_hist, wr_hist;
  logic [VW-1:0] rd_value, wr_value;
  logic [HB-1:0] ref_hist [L];
  logic [VW-1:0] ref_val  [L];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lvp_table #(.PC_W(PW), .IDX_BITS(IB), .HIST_BITS(HB), .VALUE_W(VW)) dut (
    .clk, .rst_n, .ready, .pc, .index, .rd_hist, .rd_value, .we, .wr_hist, .wr_value);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: pc=%h index=%h hist=%h value=%h", what, pc, index, rd_hist, rd_value);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    we = 0; pc = '0; wr_hist = '0; wr_value = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // Try to write during the clearing; the write must be lost.
    cyc = 0;
    we = 1; pc = 32'h0000_0010; wr_hist = 5'h1f; wr_value = 64'hdead;
    while (!ready) begin
      @(posedge clk); #1;
      cyc++;
      if (cyc > 2 * L) break;
    end
    we = 0;
    check(cyc == L, "ready after 2^IDX_BITS cycles");
    for (int i = 0; i < L; i++) begin
      ref_hist[i] = '0; ref_val[i] = '0;
      pc = PW'(i << 2) | PW'($urandom_range(0, 7) << (IB + 2));
      #1;
      check(index == IB'(i), "index is PC bits 2..IDX_BITS+1");
      check(rd_hist == '0 && rd_value == '0, "line cleared");
    end
    // Random writes and reads, with aliasing PCs.
    for (int n = 0; n < 4000; n++) begin
      logic [IB-1:0] li;
      @(negedge clk);
      li = IB'($urandom);
      pc = {PW'($urandom) & ~PW'((L - 1) << 2)} | PW'(li) << 2;
      #1;
      check(index == li, "random index");
      check(rd_hist == ref_hist[li] && rd_value == ref_val[li], "read matches last write");
      we = 1'($urandom);
      wr_hist = HB'($urandom);
      wr_value = {$urandom, $urandom};
      if (we) begin
        ref_hist[li] = wr_hist;
        ref_val[li]  = wr_value;
      end
      @(posedge clk); #1;
      we = 0;
      check(rd_hist == ref_hist[li] && rd_value == ref_val[li], "read in the cycle after the write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
