// history_update_tb: self-checking test of the history shift rule.
//
// Drives random histories and value pairs (equal about half the time, and
// values differing in a single bit) into a 14-bit and a 4-bit instance and
// compares `correct` and `new_hist` with the rule computed here:
// new = ((old << 1) | (cached == true)) truncated to the history width.
// Also walks the 4-bit instance through the history sequence of Table-4.1
// style patterns (0001 after three failures and a success).
module history_update_tb;

  logic [13:0] oh14, nh14;
  logic [3:0]  oh4, nh4;
  logic [63:0] cv, tv;
  logic        c14, c4;
  int checks = 0, failures = 0;
  logic clk = 0;

  always #5 clk = ~clk;

  history_update #(.HIST_BITS(14), .VALUE_W(64)) dut14 (
    .old_hist(oh14), .cached_value(cv), .true_value(tv), .correct(c14), .new_hist(nh14));
  history_update #(.HIST_BITS(4), .VALUE_W(64)) dut4 (
    .old_hist(oh4), .cached_value(cv), .true_value(tv), .correct(c4), .new_hist(nh4));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: old14=%h new14=%h old4=%h new4=%h cv=%h tv=%h", what, oh14, nh14, oh4, nh4, cv, tv);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_c;
    logic [3:0] h;
    for (int i = 0; i < 2000; i++) begin
      oh14 = 14'($urandom);
      oh4  = 4'($urandom);
      cv   = {$urandom, $urandom};
      case ($urandom_range(0, 2))
        0: tv = cv;
        1: tv = cv ^ (64'd1 << $urandom_range(0, 63));
        default: tv = {$urandom, $urandom};
      endcase
      #1;
      exp_c = (cv == tv);
      check(c14 == exp_c && c4 == exp_c, "outcome bit");
      check(nh14 == 14'((oh14 << 1) | 14'(exp_c)), "14-bit shift");
      check(nh4 == 4'((oh4 << 1) | 4'(exp_c)), "4-bit shift");
      @(posedge clk);
    end
    // Failure, failure, failure, success gives 0001 (newest outcome in bit 0).
    h = 4'b1111;
    for (int k = 0; k < 4; k++) begin
      oh4 = h;
      cv  = 64'h1234;
      tv  = (k == 3) ? 64'h1234 : 64'h9999;
      #1;
      h = nh4;
    end
    check(h == 4'b0001, "sequence F,F,F,S gives 0001");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
