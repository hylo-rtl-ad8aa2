// booth_pp_gen: radix-4 Booth partial-product generator.
//
// Multiplies a signed W-bit operand `a` by a Booth digit d in -2..2 without a
// multiplier: a multiplexer picks 0, a or 2a (a left shift), and the result is then
// negated by inverting it and adding one when the digit is negative. In HYLO this forms
// the exact partial products PP2 = X1 * Y0 and PP1 = Y1 * X0 of the middle column.
// The use of Booth selection follows the scheme; doing the negation exactly inside the
// generator (instead of a hot-one bit in the adder tree) is this design's choice.
//
// Interface: d (booth_digit_t), a (signed W bits) -> pp = d * a (signed W+2 bits,
// enough for 2 * -2^(W-1) negated).
// Timing: purely combinational.
module booth_pp_gen
  import hylo_pkg::*;
#(
  parameter int unsigned W = 14
) (
  input  booth_digit_t          d,
  input  logic signed [W-1:0]   a,
  output logic signed [W+1:0]   pp
);

  logic signed [W+1:0] sel;

  always_comb begin
    unique case (1'b1)
      d.two:   sel = (W+2)'(a) <<< 1;
      d.one:   sel = (W+2)'(a);
      default: sel = '0;
    endcase
    pp = d.neg ? (~sel + 1'b1) : sel;
  end

endmodule
