// dwt_dcu: delay control unit between the two lattice stages.
//
// The lower branch of the lattice needs its value from the previous
// computation of the same level, 2^j sample periods earlier for level j:
//   Xl(n) = Yl(n-2) for n = 2l, Yl(n-4) for n = 4l+1, Yl(n-8) for n = 8l+3.
// Instead of a 2^j-word delay line this uses one register per level
// (R1, R2, R3). Register Rj is loaded with the lower output of the first
// stage at the end of every cycle that computes level j, and is read
// through the multiplexer during the next such cycle; cycles of the other
// levels leave it untouched. This is the register-per-level organisation
// of the published design; the synchronous active-low reset that clears the
// registers (zero history before the first sample) is this design's choice.
//
// Ports: d is the first stage's lower output, level the level computed in
// this cycle (0 = idle), q the delayed value for the second stage
// (combinational from the registers, 0 in the idle slot).
module dwt_dcu
  import dwt_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  level_t level,
  input  word_t  d,
  output word_t  q
);

  word_t r [1:LEVELS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 1; j <= LEVELS; j++) r[j] <= '0;
    end else begin
      for (int j = 1; j <= LEVELS; j++)
        if (level == level_t'(j)) r[j] <= d;
    end
  end

  always_comb begin
    q = '0;
    for (int j = 1; j <= LEVELS; j++)
      if (level == level_t'(j)) q = r[j];
  end

endmodule
