// lcu4: 4-bit lookahead carry unit.
//
// From four (generate, propagate) pairs and a carry in, computes the carry into each of
// the four positions in two gate levels, c[i] = g[i-1] | p[i-1]&g[i-2] | ... | p[i-1..0]&cin,
// and the group generate/propagate pair (G, P) for the next lookahead level. It is the
// building block of the carry-lookahead adder.
//
// Interface: g, p (4 bits), cin -> c (4 bits, c[0] = cin), G, P.
// Timing: purely combinational.
module lcu4 (
  input  logic [3:0] g,
  input  logic [3:0] p,
  input  logic       cin,
  output logic [3:0] c,
  output logic       G,
  output logic       P
);

  always_comb begin
    c[0] = cin;
    c[1] = g[0] | (p[0] & cin);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cin);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & cin);
    G    = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
    P    = &p;
  end

endmodule
