// lattice_pe_tb: self-checking test of one lattice butterfly.
//
// Instantiates the stage with K1 and with K2, applies random and extreme
// input pairs and checks
//   yu = xu - K*xl,  yl = xl + K*xu
// twice: bit-exactly against an integer model with floor-truncated
// products, and within one LSB against the same expression in real
// arithmetic. Combinational; outputs are sampled 1 ns after each vector.
module lattice_pe_tb;
  import dwt_pkg::*;

  word_t xu, xl, yu1, yl1, yu2, yl2;
  int checks = 0, failures = 0;

  lattice_pe #(.K(K1)) dut1 (.xu, .xl, .yu(yu1), .yl(yl1));
  lattice_pe #(.K(K2)) dut2 (.xu, .xl, .yu(yu2), .yl(yl2));

  function automatic longint wrap(longint v);
    longint m = v & ((longint'(1) << DW) - 1);
    if (m >= (longint'(1) << (DW - 1))) m -= (longint'(1) << DW);
    return m;
  endfunction

  function automatic longint mulq(longint a, longint b);
    return wrap((a * b) >>> CFRAC);
  endfunction

  task automatic check(string what, longint got, longint exp, real ideal);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (xu=%0d xl=%0d)", what, got, exp, xu, xl);
    end
    checks++;
    if ((real'(got) - ideal > 1.001) || (ideal - real'(got) > 1.001)) begin
      failures++;
      $display("FAIL %s: got %0d, real-valued %f", what, got, ideal);
    end
  endtask

  task automatic apply(longint a, longint b);
    real k1r, k2r;
    k1r = real'(K1) / real'(1 << CFRAC);
    k2r = real'(K2) / real'(1 << CFRAC);
    xu = word_t'(a);
    xl = word_t'(b);
    #1;
    check("K1 yu", yu1, wrap(a - mulq(b, K1)), real'(a) - k1r * real'(b));
    check("K1 yl", yl1, wrap(b + mulq(a, K1)), real'(b) + k1r * real'(a));
    check("K2 yu", yu2, wrap(a - mulq(b, K2)), real'(a) - k2r * real'(b));
    check("K2 yl", yl2, wrap(b + mulq(a, K2)), real'(b) + k2r * real'(a));
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(0, 0);
    apply(100, 0);
    apply(0, 100);
    apply(-100, 37);
    apply(20000, -20000);
    for (int i = 0; i < 1000; i++)
      // operands up to +-2^16 so that no result wraps and the real check holds
      apply(longint'($signed($urandom) >>> 15), longint'($signed($urandom) >>> 15));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
