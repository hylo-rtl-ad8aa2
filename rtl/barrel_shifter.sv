// barrel_shifter: logarithmic left shifter for a signed operand.
//
// The operand is first sign-extended to the output width OW, then passes SW stages of
// 2:1 multiplexers; stage j shifts left by 2^j when sh[j] is set. In the HYLO log stage
// one instance forms Y0 * 2^kx (PP01) and one forms X00 * 2^ky (PP02). The role follows
// the scheme; the widths and the multiplexer structure are this design's choices. The
// caller must size OW so that the largest shift does not overflow.
//
// Interface: a (signed IW bits), sh (SW bits) -> y = a << sh (signed OW bits).
// Timing: purely combinational, SW multiplexer levels.
module barrel_shifter #(
  parameter int unsigned IW = 14,
  parameter int unsigned OW = 28,
  parameter int unsigned SW = 4
) (
  input  logic signed [IW-1:0] a,
  input  logic        [SW-1:0] sh,
  output logic signed [OW-1:0] y
);

  logic signed [OW-1:0] stage [SW+1];

  always_comb begin
    stage[0] = OW'(a);
    for (int j = 0; j < SW; j++) begin
      stage[j+1] = sh[j] ? (stage[j] <<< (1 << j)) : stage[j];
    end
    y = stage[SW];
  end

endmodule
