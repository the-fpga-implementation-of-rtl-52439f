// dwt_dfc_tb: self-checking test of the data format converter.
//
// The testbench runs the three-level schedule (level 1 for even n, 2 for
// n = 4l+1, 3 for n = 8l+3, idle for n = 8l+7, with "second" = bit j of n
// on level j < 3), drives new random words on the input u and on the
// fed-back low-pass fb in every cycle and records both. It then checks
// the pair presented to the first lattice stage against the timing
// equations of the converter:
//   level 1: xu = u(n),    xl = u(n-1)
//   level 2: xu = fb(n-1), xl = fb(n-3)
//   level 3: xu = fb(n-2), xl = fb(n-6)
// (values before the first sample are 0), and both outputs 0 when idle.
// Only the fb values of the right cycles may be captured, so random fb in
// every cycle exposes a register loaded at the wrong time. 400 cycles.
module dwt_dfc_tb;
  import dwt_pkg::*;

  logic clk = 0, rst_n = 0;
  level_t level;
  logic second;
  word_t u, fb, xu, xl;
  word_t hu[$], hf[$];
  int checks = 0, failures = 0;

  dwt_dfc dut (.clk, .rst_n, .level, .second, .u, .fb, .xu, .xl);

  always #5 clk = ~clk;

  function automatic word_t past(ref word_t h[$], input int idx);
    return (idx < 0) ? word_t'(0) : h[idx];
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    level = '0; second = 0; u = '0; fb = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      int j;
      word_t eu, el;
      if (n % 2 == 0)      begin j = 1; second = n[1]; end
      else if (n % 4 == 1) begin j = 2; second = n[2]; end
      else if (n % 8 == 3) begin j = 3; second = 0;    end
      else                 begin j = 0; second = 0;    end
      level = level_t'(j);
      u  = word_t'($urandom);
      fb = word_t'($urandom);
      hu.push_back(u);
      hf.push_back(fb);
      #1;
      case (j)
        1: begin eu = past(hu, n);     el = past(hu, n - 1); end
        2: begin eu = past(hf, n - 1); el = past(hf, n - 3); end
        3: begin eu = past(hf, n - 2); el = past(hf, n - 6); end
        default: begin eu = '0; el = '0; end
      endcase
      checks++;
      if (xu !== eu || xl !== el) begin
        failures++;
        $display("FAIL n=%0d level=%0d xu=%0d xl=%0d expected %0d %0d", n, j, xu, xl, eu, el);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
