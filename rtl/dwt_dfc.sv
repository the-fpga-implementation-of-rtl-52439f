// dwt_dfc: data format converter in front of the first lattice stage.
//
// It presents the pair of samples that the level computed in this cycle
// needs (xu the newer, xl the older sample of the pair):
//   n = 2l   (level 1): xu = u(n),        xl = u(n-1)
//   n = 4l+1 (level 2): xu = S(n-1),      xl = S(n-3)
//   n = 8l+3 (level 3): xu = S(n-2),      xl = S(n-6)
// where u is the input and S the low-pass result fed back from the end of
// the lattice. Registers:
//   R   - u delayed by one cycle
//   R1  - upper-input register; loaded with S at the end of the first of
//         the two level-1 (n = 4l) and level-2 (n = 8l+1) cycles that feed
//         one higher-level computation, read in the very next higher-level
//         slot. One register serves both levels because the two uses never
//         overlap in the three-level schedule.
//   R2  - loaded with S at the end of the second level-1 cycle (n = 4l+2)
//   R3  - loaded with S at the end of the second level-2 cycle (n = 8l+5)
// Two multiplexers select by level. This follows the register organisation
// of the published design; the load instants are derived from the timing equations
// above, and the reset (all registers 0) is this design's choice. In the
// idle slot both outputs are 0.
module dwt_dfc
  import dwt_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  level_t level,
  input  logic   second,
  input  word_t  u,
  input  word_t  fb,
  output word_t  xu,
  output word_t  xl
);

  word_t r_u;               // R
  word_t r_up;              // R1
  word_t r_lo [2:LEVELS];   // R2, R3

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r_u  <= '0;
      r_up <= '0;
      for (int j = 2; j <= LEVELS; j++) r_lo[j] <= '0;
    end else begin
      r_u <= u;
      for (int j = 1; j < LEVELS; j++) begin
        if (level == level_t'(j)) begin
          if (second) r_lo[j+1] <= fb;
          else        r_up      <= fb;
        end
      end
    end
  end

  always_comb begin
    xu = '0;
    xl = '0;
    if (level == level_t'(1)) begin
      xu = u;
      xl = r_u;
    end else begin
      for (int j = 2; j <= LEVELS; j++) begin
        if (level == level_t'(j)) begin
          xu = r_up;
          xl = r_lo[j];
        end
      end
    end
  end

endmodule
