// msb_digit_mult: the small signed multiplier for the top partial product PP3 = X1 * Y1.
//
// Both inputs are the Booth digits of the operands' most significant segments (-2..2),
// so the product is one of 0, +-1, +-2, +-4 and fits a 4-bit two's-complement result.
// The scheme calls for a small two-level circuit here rather than a general multiplier;
// the equations below are this design's own minimisation on the neg/one/two selects:
//   m1 = |p| is 1, m2 = |p| is 2, m4 = |p| is 4, s = product negative (and non-zero)
//   p[0] = m1, p[1] = m2 | s&m1, p[2] = m4 | s&(m1|m2), p[3] = s.
// The result is weighted by 2^(2(N-2)) in the final sum.
//
// Interface: dx, dy (booth_digit_t) -> p (signed 4 bits).
// Timing: purely combinational.
module msb_digit_mult
  import hylo_pkg::*;
(
  input  booth_digit_t       dx,
  input  booth_digit_t       dy,
  output logic signed [3:0]  p
);

  logic m1, m2, m4, s;

  always_comb begin
    m1 = dx.one & dy.one;
    m2 = (dx.one & dy.two) | (dx.two & dy.one);
    m4 = dx.two & dy.two;
    s  = (dx.neg ^ dy.neg) & (m1 | m2 | m4);
    p  = {s, m4 | (s & (m1 | m2)), m2 | (s & m1), m1};
  end

endmodule
