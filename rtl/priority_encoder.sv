// priority_encoder: binary encoder for the leading-one detector's one-hot output.
//
// For a one-hot input with bit k set it returns k, i.e. the characteristic
// k = floor(log2 |X0|) of the HYLO log stage; `valid` is 0 when no bit is set (operand
// zero) and k is then 0. Each output bit is the OR of the input bits whose index has that
// bit set, which is exact for a one-hot input (the leading-one detector guarantees it).
// The role follows the scheme; the OR-plane circuit is this design's choice.
//
// Interface: onehot (W bits) -> k ($clog2(W) bits), valid.
// Timing: purely combinational.
module priority_encoder #(
  parameter int unsigned W  = 14,
  parameter int unsigned KW = (W > 1) ? $clog2(W) : 1
) (
  input  logic [W-1:0]  onehot,
  output logic [KW-1:0] k,
  output logic          valid
);

  always_comb begin
    k = '0;
    for (int i = 0; i < W; i++) begin
      if (onehot[i]) k = k | KW'(i);
    end
    valid = |onehot;
  end

endmodule
