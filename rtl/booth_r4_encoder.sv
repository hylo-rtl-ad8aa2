// booth_r4_encoder: radix-4 Booth recoder for one bit triple.
//
// Turns {b[i+1], b[i], b[i-1]} into the digit -2*b[i+1] + b[i] + b[i-1] in -2..2. In the
// HYLO multiplier the triple is {x15, x14, x13}: the digit is the operand's most
// significant segment X1, and bit 13 is shared with the signed lower segment X0, so that
// X = X1 * 2^14 + X0 holds exactly. The digit formula is the scheme's own; the neg/one/two
// select encoding is the conventional one and is this design's choice.
//
// Interface: bits[2:0] = {b[i+1], b[i], b[i-1]} -> d (booth_digit_t).
// Timing: purely combinational, two gate levels.
module booth_r4_encoder
  import hylo_pkg::*;
(
  input  logic [2:0]   bits,
  output booth_digit_t d
);

  always_comb begin
    d.neg = bits[2];
    d.one = bits[1] ^ bits[0];
    d.two = (bits[2] & ~bits[1] & ~bits[0]) | (~bits[2] & bits[1] & bits[0]);
  end

endmodule
