// lod: leading-one detector.
//
// Produces a one-hot vector with a single 1 at the position of the most significant set
// bit of `a`, and all zeros when `a` is zero. It works as a prefix OR from the MSB down
// (seen[i] = some bit at or above i is set) followed by an edge detect
// (onehot[i] = a[i] & no bit above i is set). In the HYLO log stage it marks 2^k of |X0|
// and |Y0|; XOR-ing |X0| with this vector clears the leading one and leaves the
// mantissa X00 = |X0| - 2^kx. The role follows the scheme; the circuit is this design's.
//
// Interface: a (W bits) -> onehot (W bits).
// Timing: purely combinational; the prefix OR is a chain of W gates.
module lod #(
  parameter int unsigned W = 14
) (
  input  logic [W-1:0] a,
  output logic [W-1:0] onehot
);

  logic [W:0] above;   // above[i]: some bit of a at position >= i is set

  always_comb begin
    above[W] = 1'b0;
    for (int i = W - 1; i >= 0; i--) begin
      above[i] = above[i+1] | a[i];
    end
    for (int i = 0; i < W; i++) begin
      onehot[i] = a[i] & ~above[i+1];
    end
  end

endmodule
