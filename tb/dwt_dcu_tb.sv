// dwt_dcu_tb: self-checking test of the delay control unit.
//
// The testbench runs the three-level schedule itself (level 1 for even n,
// 2 for n = 4l+1, 3 for n = 8l+3, idle for n = 8l+7), drives a new random
// word on d every cycle and keeps the history of d. In every cycle of
// level j the output must equal d from 2^j cycles earlier (0 before the
// first sample); in the idle slot it must be 0. 400 cycles.
module dwt_dcu_tb;
  import dwt_pkg::*;

  logic clk = 0, rst_n = 0;
  level_t level;
  word_t d, q;
  word_t hist[$];
  int checks = 0, failures = 0;

  dwt_dcu dut (.clk, .rst_n, .level, .d, .q);

  always #5 clk = ~clk;

  function automatic int sched_level(int n);
    if (n % 2 == 0) return 1;
    if (n % 4 == 1) return 2;
    if (n % 8 == 3) return 3;
    return 0;
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    level = '0;
    d = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      int j;
      word_t exp_q;
      j = sched_level(n);
      level = level_t'(j);
      d = word_t'($urandom);
      hist.push_back(d);
      #1;
      if (j == 0) exp_q = '0;
      else if (n - (1 << j) < 0) exp_q = '0;
      else exp_q = hist[n - (1 << j)];
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("FAIL n=%0d level=%0d q=%0d expected %0d", n, j, q, exp_q);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
