// dwt_top_tb: end-to-end test of the folded three-level D4 lattice DWT.
//
// Runs the top level at its default parameters, twice: a first run of 301
// random samples is cut off by a reset in the middle of the 8-cycle
// schedule period, and the second run must then behave as if every
// register had been cleared. The second run's input is a mix of
// signal classes: random full-range 8-bit samples, a long run of the
// largest positive sample (DC; the lattice gain is largest there), an
// alternating +127/-128 sequence (the highest frequency), a single
// impulse and a slow ramp, followed by zeros to flush the last level.
//
// Reference: the transform is recomputed level by level, without any
// folding, registers or schedule: each level is a plain two-stage lattice
// run over the decimated low-pass sequence of the level before it, with
// the same 20-bit word, the same Q3.5 coefficients and floor-truncated
// products, in 64-bit integer arithmetic. Every cycle the testbench
// checks out_valid and out_level against the schedule (level 1 for even
// n, 2 for n = 4l+1, 3 for n = 8l+3, none for n = 8l+7, all one cycle
// later at the registered outputs) and, for a valid cycle, both results
// bit-exactly. Level-1 results are also compared with the ideal
// Daubechies 4-tap filters in real arithmetic, scaled by the lattice gain,
// within a bound made of the coefficient rounding and the truncations.
// The number of results per level (N/2, N/4, N/8) is checked, and each
// mechanism (the three levels, the idle slot, the feedback through the
// DFC, the three DCU delays) must have occurred at least once.
module dwt_top_tb;
  import dwt_pkg::*;

  localparam int N     = 2048;         // samples of signal
  localparam int TOTAL = N + 16;       // plus zeros to flush level 3
  localparam int PHASE_A = 301;        // samples before the mid-stream reset

  logic clk = 0, rst_n = 0;
  logic signed [7:0] u_in;
  logic out_valid;
  logic [LW-1:0] out_level;
  logic signed [DW-1:0] low_out, high_out;

  int checks = 0, failures = 0;

  dwt_top dut (.clk, .rst_n, .u_in, .out_valid, .out_level, .low_out, .high_out);

  always #5 clk = ~clk;

  // ---------------------------------------------------------------- model
  longint u[TOTAL];
  longint s[4][$];   // s[0] = input, s[j] = low-pass of level j
  longint w[4][$];   // high-pass of level j

  function automatic longint wrap(longint v);
    longint m = v & ((longint'(1) << DW) - 1);
    if (m >= (longint'(1) << (DW - 1))) m -= (longint'(1) << DW);
    return m;
  endfunction

  function automatic longint mulq(longint a, longint b);
    return wrap((a * b) >>> CFRAC);
  endfunction

  task automatic run_level(int j);
    longint lprev = 0;
    longint k1 = longint'(K1), k2 = longint'(K2);
    for (int l = 0; 2 * l < s[j-1].size(); l++) begin
      longint a, b, u1, l1;
      a = s[j-1][2*l];
      b = (l == 0) ? 0 : s[j-1][2*l-1];
      u1 = wrap(a - mulq(b, k1));
      l1 = wrap(b + mulq(a, k1));
      w[j].push_back(wrap(u1 - mulq(lprev, k2)));
      s[j].push_back(wrap(lprev + mulq(u1, k2)));
      lprev = l1;
    end
  endtask

  // ideal level-1 results: lattice gain times the D4 filters of the design
  task automatic check_ideal(int l, longint hw_low, longint hw_high);
    real r3, g, k1q, k2q, x[4], hq[4], he[4], gq[4], ge[4];
    real ideal_l, ideal_h, tol_l, tol_h;
    r3 = $sqrt(3.0);
    g = -4.0 * (1.0 + r3);
    k1q = real'(K1) / real'(1 << CFRAC);
    k2q = real'(K2) / real'(1 << CFRAC);
    for (int k = 0; k < 4; k++) x[k] = (2*l - k < 0) ? 0.0 : real'(u[2*l - k]);
    he = '{g*(1+r3)/8, g*(3+r3)/8, g*(3-r3)/8, g*(1-r3)/8};
    ge = '{g*(1-r3)/8, -g*(3-r3)/8, g*(3+r3)/8, -g*(1+r3)/8};
    hq = '{k2q, -k1q*k2q, k1q, 1.0};
    gq = '{1.0, -k1q, -k1q*k2q, -k2q};
    ideal_l = 0; ideal_h = 0; tol_l = 8; tol_h = 8;
    for (int k = 0; k < 4; k++) begin
      ideal_l += he[k] * x[k];
      ideal_h += ge[k] * x[k];
      tol_l += ((hq[k] > he[k]) ? hq[k] - he[k] : he[k] - hq[k]) * ((x[k] < 0) ? -x[k] : x[k]);
      tol_h += ((gq[k] > ge[k]) ? gq[k] - ge[k] : ge[k] - gq[k]) * ((x[k] < 0) ? -x[k] : x[k]);
    end
    checks++;
    if ((real'(hw_low) - ideal_l > tol_l) || (ideal_l - real'(hw_low) > tol_l) ||
        (real'(hw_high) - ideal_h > tol_h) || (ideal_h - real'(hw_high) > tol_h)) begin
      failures++;
      $display("FAIL ideal l=%0d low=%0d (%f) high=%0d (%f)", l, hw_low, ideal_l, hw_high, ideal_h);
    end
  endtask

  // ----------------------------------------------------------- stimulus
  // Phase A: random samples, cut short by a reset in the middle of the
  // schedule period. Phase B: the signal classes listed above, then zeros.
  task automatic make_stimulus(bit phase_b, int len);
    for (int t = 0; t < len; t++) begin
      if (!phase_b)                u[t] = longint'($signed(8'($urandom)));
      else if (t >= N)             u[t] = 0;
      else if (t < 1024)           u[t] = longint'($signed(8'($urandom)));
      else if (t < 1280)           u[t] = 127;
      else if (t < 1536)           u[t] = (t % 2 == 0) ? 127 : -128;
      else if (t < 1792)           u[t] = (t == 1600) ? -128 : 0;
      else                         u[t] = longint'(t - 1792) / 2 - 64;
    end
    for (int j = 0; j <= 3; j++) begin
      s[j].delete();
      w[j].delete();
    end
    for (int t = 0; t < len; t++) s[0].push_back(u[t]);
    for (int j = 1; j <= 3; j++) run_level(j);
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (TOTAL + PHASE_A + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // --------------------------------------------------------------- drive
  int n_res[4] = '{0, 0, 0, 0};   // [0] counts idle slots
  int n_fb = 0, n_large = 0, n_resets = 0;

  // Drive u[0..len-1] from reset release on and check every result. On
  // return the last result has been checked and the clock is low.
  task automatic run_phase(int len);
    int cnt[4] = '{0, 0, 0, 0};
    rst_n = 1;
    for (int t = 0; t <= len; t++) begin
      // outputs now show what cycle t-1 computed
      if (t >= 1) begin
        int c, j, k;
        c = t - 1;
        if (c % 2 == 0) j = 1;
        else if (c % 4 == 1) j = 2;
        else if (c % 8 == 3) j = 3;
        else j = 0;
        checks++;
        if (out_valid !== (j != 0) || (j != 0 && int'(out_level) != j)) begin
          failures++;
          $display("FAIL cycle %0d: valid=%0d level=%0d expected level %0d", c, out_valid, out_level, j);
        end
        cnt[j]++;
        if (j != 0) begin
          k = (c - ((1 << (j - 1)) - 1)) >> j;
          checks++;
          if (longint'(low_out) != s[j][k] || longint'(high_out) != w[j][k]) begin
            failures++;
            $display("FAIL level %0d index %0d: low=%0d high=%0d expected %0d %0d",
                     j, k, low_out, high_out, s[j][k], w[j][k]);
          end
          if (j == 1) check_ideal(k, longint'(low_out), longint'(high_out));
          if (j >= 2) n_fb++;
          if (low_out > 100000 || low_out < -100000) n_large++;
        end
      end
      if (t < len) begin
        u_in = 8'(u[t]);
        @(negedge clk);
      end
    end
    // rate: every level delivers its share of results
    checks++;
    if (cnt[1] != (len + 1) / 2 || cnt[2] != (len + 2) / 4 || cnt[3] != (len + 4) / 8) begin
      failures++;
      $display("FAIL result counts %0d %0d %0d over %0d cycles", cnt[1], cnt[2], cnt[3], len);
    end
    for (int j = 0; j <= 3; j++) n_res[j] += cnt[j];
  endtask

  task automatic reset_now();
    rst_n = 0;
    u_in = 8'($urandom);
    repeat (2) @(negedge clk);
    checks++;
    if (out_valid !== 1'b0) begin
      failures++;
      $display("FAIL out_valid set during reset");
    end
    n_resets++;
  endtask

  initial begin
    u_in = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    reset_now();
    // phase A, stopped mid-stream (PHASE_A is not a multiple of 8)
    make_stimulus(0, PHASE_A);
    run_phase(PHASE_A);
    // reset with history in every register: phase B must start from zero
    reset_now();
    make_stimulus(1, TOTAL);
    run_phase(TOTAL);
    // every mechanism must have happened
    for (int j = 0; j <= 3; j++) begin
      checks++;
      if (n_res[j] == 0) begin
        failures++;
        $display("FAIL mechanism never seen: %s %0d", j == 0 ? "idle slot" : "level", j);
      end
    end
    checks++;
    if (n_fb == 0 || n_large == 0 || n_resets < 2) begin
      failures++;
      $display("FAIL feedback results %0d, large results %0d, resets %0d", n_fb, n_large, n_resets);
    end
    $display("level-1 results %0d (DCU 2-cycle delay), level-2 %0d (DCU 4-cycle delay), level-3 %0d (DCU 8-cycle delay)",
             n_res[1], n_res[2], n_res[3]);
    $display("idle slots %0d, results fed from the DFC feedback %0d, results beyond +-100000 %0d, resets %0d",
             n_res[0], n_fb, n_large, n_resets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
