// dwt_top: folded three-level Daubechies 4-tap discrete wavelet transform
// on a two-stage QMF lattice.
//
// One input sample u_in is taken every clock cycle. A single lattice, the
// data format converter (DFC), the first stage PE0 (coefficient K1), the
// delay control unit (DCU) and the second stage PE1 (coefficient K2), is
// shared by all three levels: level 1 is computed in even cycles, level 2
// in cycles n = 4l+1, level 3 in cycles n = 8l+3, and cycle n = 8l+7 is
// idle. The low-pass result of each level is fed back into the DFC, which
// supplies it as input data to the next level.
//
//   u_in -> DFC -> PE0(K1) --upper---------------> PE1(K2) -> high-pass W_j
//                         \--lower-> DCU (2^j) -->/        -> low-pass  S_j --+
//            ^-------------------------------------------------------------+
//
// With x0 = newest and x3 = oldest of four consecutive level-(j-1) samples
// (x = u for level 1) the two results are
//   S = K2*x0 - K1*K2*x1 + K1*x2 + x3      (a multiple of the D4 low-pass)
//   W = x0 - K1*x1 - K1*K2*x2 - K2*x3       (a multiple of the D4 high-pass)
// Both carry the lattice gain (about -4*(1+sqrt(3)) against the unit-DC-gain
// Daubechies filter); it is not removed, so each level grows the word by
// about 3.5 bits. The 8-bit input, sign-extended into the 20-bit datapath,
// leaves room for three levels.
//
// Interface: all outputs are registered, one cycle after the cycle that
// computes them. out_valid marks a result, out_level tells its level
// (1..3); out_level = 3 also marks low_out as the final approximation S3.
// Per 8 input samples there are 4 level-1, 2 level-2 and 1 level-3 result.
// rst_n is an active-low synchronous reset; it clears all history (the
// signal is taken as zero before the first sample) and restarts the
// schedule at n = 0 with the first sample after reset.
//
// The structure, the schedule and the coefficients follow the published
// design; the input width, the coefficient format, the truncating
// multipliers, the output registers and the reset are this design's choices.
module dwt_top
  import dwt_pkg::*;
#(
  parameter int unsigned IN_W = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [IN_W-1:0] u_in,
  output logic                   out_valid,
  output logic [LW-1:0]          out_level,
  output logic signed [DW-1:0]   low_out,
  output logic signed [DW-1:0]   high_out
);

  level_t      level;
  logic        second;
  word_t       u_ext, xu, xl, u1, l1, l1d, w_high, s_low;

  assign u_ext = word_t'(u_in);

  dwt_ctrl u_ctrl (
    .clk, .rst_n, .n(), .level, .second
  );

  dwt_dfc u_dfc (
    .clk, .rst_n, .level, .second,
    .u (u_ext), .fb(s_low), .xu, .xl
  );

  lattice_pe #(.K(K1)) u_pe0 (
    .xu, .xl, .yu(u1), .yl(l1)
  );

  dwt_dcu u_dcu (
    .clk, .rst_n, .level, .d(l1), .q(l1d)
  );

  lattice_pe #(.K(K2)) u_pe1 (
    .xu(u1), .xl(l1d), .yu(w_high), .yl(s_low)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_level <= '0;
      low_out   <= '0;
      high_out  <= '0;
    end else begin
      out_valid <= (level != LEVEL_IDLE);
      out_level <= level;
      low_out   <= s_low;
      high_out  <= w_high;
    end
  end

  // A result is flagged valid exactly when it carries a level number.
  assert property (@(posedge clk) disable iff (!rst_n)
                   out_valid == (out_level != '0));

endmodule
