// decision_rom_tb: self-checking test of the 2^14 x 1-bit decision table.
//
// Programs every entry with a random bit through the programming port,
// keeping a copy here, then reads every history pattern back and compares
// the combinational `predict` output with the copy. A second pass rewrites
// a random subset and checks all entries again, and a pattern set chosen by
// rule (all-ones history only, as for a very high confidence threshold) is
// checked last.
module decision_rom_tb;

  localparam int unsigned H = 14;
  localparam int unsigned N = 2 ** H;

  logic         clk = 0;
  logic [H-1:0] hist, prog_addr;
  logic         predict, prog_we, prog_data;
  bit           ref_rom [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  decision_rom #(.HIST_BITS(H)) dut (
    .clk, .hist, .predict, .prog_we, .prog_addr, .prog_data);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_bit(input int a, input bit d);
    @(negedge clk);
    prog_we = 1; prog_addr = H'(a); prog_data = d;
    ref_rom[a] = d;
    @(posedge clk);
    #1 prog_we = 0;
  endtask

  task automatic check_all(input string what);
    int bad = 0;
    for (int a = 0; a < N; a++) begin
      hist = H'(a);
      #1;
      checks++;
      if (predict !== ref_rom[a]) begin
        failures++; bad++;
        if (bad < 5) $display("FAIL %s: hist=%h predict=%b expected=%b", what, a, predict, ref_rom[a]);
      end
    end
  endtask

  initial begin
    prog_we = 0; prog_addr = '0; prog_data = 0; hist = '0;
    for (int a = 0; a < N; a++) write_bit(a, 1'($urandom));
    check_all("random contents");
    for (int i = 0; i < 3000; i++) write_bit(int'($urandom_range(0, N - 1)), 1'($urandom));
    check_all("rewritten contents");
    for (int a = 0; a < N; a++) write_bit(a, a == N - 1);
    check_all("all-ones history only");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
