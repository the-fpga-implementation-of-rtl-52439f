// dwt_pkg: widths, lattice coefficients and shared types of the folded
// Daubechies-4 lattice DWT.
//
// The datapath is 20 bits wide and the lattice coefficients 8 bits wide,
// the "20x8 bit" multiplier size of the published FPGA design that this
// RTL follows. Three resolution levels are computed by one shared pair of
// lattice stages. The two lattice
// coefficients of the Daubechies 4-tap filter are
//   K1 = -sqrt(3)      = -1.7320508
//   K2 = -(2+sqrt(3))  = -3.7320508
// held here as signed 8-bit numbers with 5 fractional bits (Q3.5), i.e.
// round(K*32): K1 -> -55 (-1.71875), K2 -> -119 (-3.71875). The fractional
// bit count is this design's choice; it is the largest one for which K2
// still fits in 8 signed bits.
package dwt_pkg;

  // Datapath word width (multiplier data operand).
  localparam int unsigned DW     = 20;
  // Coefficient width (multiplier coefficient operand).
  localparam int unsigned CW     = 8;
  // Fractional bits of the coefficients.
  localparam int unsigned CFRAC  = 5;
  // Number of resolution levels (octaves) the schedule computes.
  localparam int unsigned LEVELS = 3;
  // Width of the sample-period counter n (one period of the schedule is 2^LEVELS).
  localparam int unsigned NW     = LEVELS;
  // Width of a level number: 0 = idle slot, 1..LEVELS = level computed.
  localparam int unsigned LW     = $clog2(LEVELS + 1);

  typedef logic signed [DW-1:0] word_t;
  typedef logic signed [CW-1:0] coef_t;
  typedef logic [LW-1:0]        level_t;

  localparam coef_t K1 = -8'sd55;   // round(-sqrt(3)     * 2^CFRAC)
  localparam coef_t K2 = -8'sd119;  // round(-(2+sqrt(3)) * 2^CFRAC)

  localparam level_t LEVEL_IDLE = '0;

endpackage
