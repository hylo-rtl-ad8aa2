// wallace_tree: carry-save reduction of the five HYLO partial products to two rows.
//
// The five rows (PP3, PP2, PP1, PP01, PP02, each aligned and sign-extended to W bits) are
// reduced Wallace-style, with every level compressing as many groups of three rows as
// it can at once:
//   level 1: rows 0,1,2 -> 2 rows, rows 3,4 pass  (5 -> 4)
//   level 2: three rows -> 2 rows, one passes     (4 -> 3)
//   level 3: three rows -> 2 rows                 (3 -> 2)
// The two rows left go to the final carry-lookahead adder. The use of a Wallace tree is
// the scheme's; the level schedule and full sign extension are this design's choices.
//
// Interface: ops[5] (W bits each) -> sum, carry (W bits); sum + carry = sum of ops mod 2^W.
// Timing: purely combinational, three full-adder delays.
module wallace_tree #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] ops [5],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  logic [W-1:0] s1, c1, s2, c2;

  csa_row #(.W(W)) u_l1 (.a(ops[0]), .b(ops[1]), .c(ops[2]), .sum(s1), .carry(c1));
  csa_row #(.W(W)) u_l2 (.a(s1),     .b(c1),     .c(ops[3]), .sum(s2), .carry(c2));
  csa_row #(.W(W)) u_l3 (.a(s2),     .b(c2),     .c(ops[4]), .sum(sum), .carry(carry));

endmodule
