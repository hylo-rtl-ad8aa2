// csa_row: one row of full adders (a 3:2 carry-save counter of width W).
//
// Reduces three W-bit rows to a sum row and a carry row with a + b + c = sum + carry
// (mod 2^W). The carry row is returned already shifted left by one place, its MSB carry
// dropped, as in any fixed-width two's-complement sum. It is the building block of the
// Wallace tree.
//
// Interface: a, b, c (W bits) -> sum, carry (W bits).
// Timing: purely combinational, one full-adder delay.
module csa_row #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  logic [W-2:0] maj;   // carries out of bits W-2..0 (the top carry leaves the width)

  always_comb begin
    sum   = a ^ b ^ c;
    maj   = (a[W-2:0] & b[W-2:0]) | (a[W-2:0] & c[W-2:0]) | (b[W-2:0] & c[W-2:0]);
    carry = {maj, 1'b0};
  end

endmodule
