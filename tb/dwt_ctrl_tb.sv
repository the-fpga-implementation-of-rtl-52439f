// dwt_ctrl_tb: self-checking test of the level scheduler.
//
// After a synchronous reset the counter must start at n = 0 and the
// scheduler must announce level 1 for even n, level 2 for n = 4l+1,
// level 3 for n = 8l+3 and the idle slot for n = 8l+7; "second" must be
// bit 1 of n on level 1 and bit 2 of n on level 2. The expected values
// are computed from n modulo 8 with a table written out here. The test
// also checks the rate: 4, 2 and 1 computations of levels 1, 2 and 3 and
// one idle slot in every 8 cycles, over 200 cycles.
module dwt_ctrl_tb;
  import dwt_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [NW-1:0] n;
  level_t level;
  logic second;
  int checks = 0, failures = 0;
  int cnt[4] = '{0, 0, 0, 0};

  dwt_ctrl dut (.clk, .rst_n, .n, .level, .second);

  always #5 clk = ~clk;

  // n mod 8:          0  1  2  3  4  5  6  7
  int exp_level[8] = '{1, 2, 1, 3, 1, 2, 1, 0};
  int exp_second[8] = '{0, 0, 1, 0, 0, 1, 1, 0};

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      checks++;
      if (int'(n) != t % 8) begin
        failures++;
        $display("FAIL t=%0d n=%0d", t, n);
      end
      checks++;
      if (int'(level) != exp_level[t % 8] || int'(second) != exp_second[t % 8]) begin
        failures++;
        $display("FAIL t=%0d level=%0d second=%0d expected %0d %0d", t, level, second,
                 exp_level[t % 8], exp_second[t % 8]);
      end
      cnt[int'(level)]++;
    end
    checks++;
    if (cnt[1] != 100 || cnt[2] != 50 || cnt[3] != 25 || cnt[0] != 25) begin
      failures++;
      $display("FAIL rate: idle=%0d l1=%0d l2=%0d l3=%0d", cnt[0], cnt[1], cnt[2], cnt[3]);
    end
    // reset in the middle of a period restarts at n = 0
    @(negedge clk) rst_n = 0;
    @(negedge clk) rst_n = 1;
    checks++;
    if (n != 0 || level != 1) begin
      failures++;
      $display("FAIL after reset n=%0d level=%0d", n, level);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
