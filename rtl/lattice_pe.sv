// lattice_pe: one two-channel QMF lattice stage (processing element).
//
// A butterfly with one coefficient K and two multipliers:
//   yu = xu - K*xl        (upper output)
//   yl = xl + K*xu        (lower output)
// Two such stages, K = K1 and then K = K2 with a delay between them on the
// lower branch, realise the Daubechies 4-tap low-pass and high-pass pair:
// the lower output of the second stage is the low-pass result
//   F = K2*x0 - K1*K2*x1 + K1*x2 + x3
// and the upper output the high-pass result
//   G = x0 - K1*x1 - K1*K2*x2 - K2*x3.
// The two-stage lattice, the polynomials and K1, K2 follow the published
// design; the placement of the signs is derived here as the one that
// yields exactly those two polynomials. Purely combinational; products are formed by coef_mult.
module lattice_pe
  import dwt_pkg::*;
#(
  parameter coef_t K = K1
) (
  input  word_t xu,
  input  word_t xl,
  output word_t yu,
  output word_t yl
);

  word_t k_xl, k_xu;

  coef_mult #(.DW(DW), .CW(CW), .CFRAC(CFRAC)) u_mul_l (.x(xl), .k(K), .p(k_xl));
  coef_mult #(.DW(DW), .CW(CW), .CFRAC(CFRAC)) u_mul_u (.x(xu), .k(K), .p(k_xu));

  always_comb begin
    yu = xu - k_xl;
    yl = xl + k_xu;
  end

endmodule
