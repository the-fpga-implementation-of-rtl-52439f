// coef_mult: signed fixed-point coefficient multiplier of the lattice.
//
// Multiplies a DW-bit signed data word by a CW-bit signed coefficient that
// has CFRAC fractional bits, and returns the product in the data format:
//   p = (x * k) >>> CFRAC, kept to DW bits.
// The shift truncates toward minus infinity and the result wraps if it
// does not fit; with 8-bit input samples the lattice gains keep every
// product inside 20 bits, so the wrap is never reached in normal use.
// Purely combinational. The 20x8 operand size is the multiplier size of the
// published FPGA design this RTL follows; the rounding (truncation) and the
// fixed-point format are this design's own choice. The low CFRAC bits and
// the top CW-CFRAC bits of the full product are dropped on purpose
// (truncation and wrap), so lint reports them as unused.
module coef_mult #(
  parameter int unsigned DW    = 20,
  parameter int unsigned CW    = 8,
  parameter int unsigned CFRAC = 5
) (
  input  logic signed [DW-1:0] x,
  input  logic signed [CW-1:0] k,
  output logic signed [DW-1:0] p
);

  logic signed [DW+CW-1:0] prod;

  always_comb begin
    prod = x * k;
    p    = prod[CFRAC +: DW];
  end

endmodule
