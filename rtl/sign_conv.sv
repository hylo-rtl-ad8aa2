// sign_conv: sign conversion (conditional two's-complement negation).
//
// y = neg ? -a : a, computed as (a XOR {W{neg}}) + neg. Driven with neg = a[W-1] it gives
// the absolute value of a signed operand; read as an unsigned W-bit number this is exact
// even for -2^(W-1). Driven with the sign of a product it applies that sign to an
// unsigned magnitude. In the HYLO log stage one instance takes |X0|, one |Y0| and one
// gives X00 the sign of X0*Y0. The role of the block follows the scheme; the
// invert-and-increment circuit is this design's choice.
//
// Interface: a (W bits), neg -> y (W bits).
// Timing: purely combinational (one W-bit incrementer).
module sign_conv #(
  parameter int unsigned W = 14
) (
  input  logic [W-1:0] a,
  input  logic         neg,
  output logic [W-1:0] y
);

  always_comb y = (a ^ {W{neg}}) + W'(neg);

endmodule
