// dwt_ctrl: sample-period counter and level scheduler.
//
// One input sample arrives per clock cycle; n counts those periods modulo
// 2^LEVELS. The single pair of lattice stages computes
//   level 1 when n = 2l,
//   level 2 when n = 4l+1,
//   level 3 when n = 8l+3,
// and nothing when n = 8l+7 (idle slot). In general level j is computed
// when the low j bits of n equal 2^(j-1)-1, i.e. level = (number of
// trailing one bits of n) + 1. The schedule follows the published design; the
// counter that produces it is the simplest one that does.
//
// Outputs (combinational from the counter):
//   level  - level computed in this cycle, 0 in the idle slot
//   second - for level j < LEVELS, bit j of n: 0 for the first and 1 for
//            the second of the two level-j results that feed one level-j+1
//            computation. It steers the fed-back result into the DFC.
//   n      - the counter itself
// rst_n is an active-low synchronous reset that sets n to 0.
module dwt_ctrl
  import dwt_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  output logic [NW-1:0] n,
  output level_t        level,
  output logic          second
);

  always_ff @(posedge clk) begin
    if (!rst_n) n <= '0;
    else        n <= n + 1'b1;
  end

  always_comb begin
    level  = LEVEL_IDLE;
    second = 1'b0;
    for (int unsigned j = 1; j <= LEVELS; j++) begin
      if ((n & NW'((1 << j) - 1)) == NW'((1 << (j - 1)) - 1)) begin
        level = level_t'(j);
        if (j < LEVELS) second = n[j];
      end
    end
  end

  // Exactly one slot per period, n = 2^LEVELS - 1, is idle; only a level
  // below LEVELS has a result that is fed forward.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (level == LEVEL_IDLE) == (n == '1));
  assert property (@(posedge clk) disable iff (!rst_n)
                   second |-> (level != LEVEL_IDLE && level != level_t'(LEVELS)));

endmodule
