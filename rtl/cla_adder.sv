// cla_adder: carry-lookahead adder, the final adder of the HYLO multiplier.
//
// Three levels of 4-bit lookahead carry units: level 1 works on the bit pairs
// (g = a&b, p = a^b) in groups of 4, level 2 on the group (G, P) pairs in sections of
// 16 bits, level 3 on the (at most four) section pairs, with unused inputs padded as
// propagate-only. Carries flow back down from level 3 to the bits, and s = p ^ carry.
// The adder type is the scheme's; its organisation is this design's choice.
// W must be a multiple of 16, at most 64 (checked at elaboration).
// For W < 64 the level-3 carries into the padded positions are computed but not used.
//
// Interface: a, b (W bits), cin -> s (W bits), cout.
// Timing: purely combinational, about 3 + 2*3 gate levels.
module cla_adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  localparam int unsigned NG1 = W / 4;    // 4-bit groups
  localparam int unsigned NG2 = W / 16;   // 16-bit sections

  if (W % 16 != 0 || W == 0 || W > 64) begin : g_bad_width
    $error("cla_adder: W must be a multiple of 16 between 16 and 64");
  end

  logic [W-1:0]   g, p, c;
  logic [NG1-1:0] g1, p1, c1;    // group generate/propagate, carry into each group
  logic [NG2-1:0] g2, p2;        // section generate/propagate
  logic [3:0]     g2_pad, p2_pad, c2_pad;
  logic           g3, p3;

  assign g = a & b;
  assign p = a ^ b;

  for (genvar i = 0; i < NG1; i++) begin : g_l1
    lcu4 u_lcu (
      .g(g[4*i +: 4]), .p(p[4*i +: 4]), .cin(c1[i]),
      .c(c[4*i +: 4]), .G(g1[i]), .P(p1[i])
    );
  end

  for (genvar j = 0; j < NG2; j++) begin : g_l2
    lcu4 u_lcu (
      .g(g1[4*j +: 4]), .p(p1[4*j +: 4]), .cin(c2_pad[j]),
      .c(c1[4*j +: 4]), .G(g2[j]), .P(p2[j])
    );
  end

  always_comb begin
    g2_pad = '0;
    p2_pad = '1;
    g2_pad[NG2-1:0] = g2;
    p2_pad[NG2-1:0] = p2;
  end

  lcu4 u_l3 (.g(g2_pad), .p(p2_pad), .cin(cin), .c(c2_pad), .G(g3), .P(p3));

  assign s    = p ^ c;
  assign cout = g3 | (p3 & cin);

endmodule
