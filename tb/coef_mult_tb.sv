// coef_mult_tb: self-checking test of the 20x8 fixed-point multiplier.
//
// Drives the two lattice coefficients and random coefficients against
// random, zero and extreme data words, and compares the product with
// floor(x*k / 2^5) worked out in 64-bit integer arithmetic and wrapped to
// 20 bits. The multiplier is combinational; each vector is checked 1 ns
// after it is applied.
module coef_mult_tb;
  import dwt_pkg::*;

  word_t x;
  coef_t k;
  word_t p;
  int checks = 0, failures = 0;

  coef_mult #(.DW(DW), .CW(CW), .CFRAC(CFRAC)) dut (.x, .k, .p);

  function automatic longint wrap(longint v);
    longint m = v & ((longint'(1) << DW) - 1);
    if (m >= (longint'(1) << (DW - 1))) m -= (longint'(1) << DW);
    return m;
  endfunction

  function automatic longint model(longint a, longint b);
    longint prod = a * b;
    // floor division by 2^CFRAC
    longint q = (prod >= 0) ? prod / (1 << CFRAC)
                            : -((-prod + (1 << CFRAC) - 1) / (1 << CFRAC));
    return wrap(q);
  endfunction

  task automatic apply(longint a, longint b);
    x = word_t'(a);
    k = coef_t'(b);
    #1;
    checks++;
    if (longint'(p) != model(longint'(x), longint'(k))) begin
      failures++;
      $display("FAIL x=%0d k=%0d p=%0d expected %0d", x, k, p, model(longint'(x), longint'(k)));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint edges[6] = '{0, 1, -1, 32, (1 << 19) - 1, -(1 << 19)};
    foreach (edges[i]) begin
      apply(edges[i], longint'(K1));
      apply(edges[i], longint'(K2));
      apply(edges[i], 127);
      apply(edges[i], -128);
    end
    // worked examples: 1000 * K1 = -1718.75 -> -1719; -1000 * K2 = 3718.75 -> 3718
    x = 20'sd1000; k = K1; #1; checks++; if (p != -20'sd1719) begin failures++; $display("FAIL 1000*K1 = %0d", p); end
    x = -20'sd1000; k = K2; #1; checks++; if (p != 20'sd3718) begin failures++; $display("FAIL -1000*K2 = %0d", p); end
    for (int i = 0; i < 2000; i++)
      apply(longint'($signed($urandom) >>> 12), longint'($signed($urandom) >>> 24));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
