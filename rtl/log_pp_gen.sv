// log_pp_gen: logarithmic approximation of the lower-segment product PP0 = X0 * Y0.
//
// Writing |X0| = 2^kx + X00 (kx = floor(log2 |X0|), X00 the mantissa below the leading
// one), the exact product is sign(X0) * Y0 * 2^kx + sign(X0*Y0) * X00 * |Y0|. The second
// term is approximated by replacing |Y0| with its leading power of two 2^ky, which is
// the first step of the iterative logarithmic multiplier. The result is left as two
// rows for the adder tree:
//   PP01 = sign(X0)    * Y0  * 2^kx
//   PP02 = sign(X0*Y0) * X00 * 2^ky
// Data path (as in the scheme's log-stage diagram): sign conversion gives |X0| and |Y0|;
// leading-one detectors and priority encoders give kx and ky; |X0| XOR the one-hot
// leading one gives X00; a third sign conversion gives X00 the sign of the product; two
// barrel shifters, with the exponents crossed, form the two rows.
// This design's own choices: the sign of X0 is applied to PP01 after its shift (the
// diagram feeds Y0 to the shifter unchanged, the formula multiplies by sign(X0)); the
// sign of PP02 is that of the product X0*Y0; a zero operand gives PP01 = PP02 = 0.
//
// Interface: x0, y0 (signed W bits) -> pp01, pp02 (signed 2W bits).
// Timing: purely combinational.
module log_pp_gen #(
  parameter int unsigned W = 14
) (
  input  logic signed [W-1:0]   x0,
  input  logic signed [W-1:0]   y0,
  output logic signed [2*W-1:0] pp01,
  output logic signed [2*W-1:0] pp02
);

  localparam int unsigned KW = $clog2(W);

  logic          x_neg, y_neg;
  logic [W-1:0]  ax, ay;             // |X0|, |Y0| (unsigned)
  logic [W-1:0]  ohx, ohy;           // leading ones, one-hot
  logic [KW-1:0] kx, ky;
  logic          x_nz, y_nz;         // X0 != 0, Y0 != 0
  logic [W-1:0]  x00;                // |X0| - 2^kx
  logic [W-1:0]  x00_in;
  logic [W-1:0]  x00_signed;
  logic signed [2*W-1:0] y0_shifted;
  logic [2*W-1:0]        y0_gated;
  logic [2*W-1:0]        pp01_u;

  assign x_neg = x0[W-1];
  assign y_neg = y0[W-1];

  sign_conv #(.W(W)) u_abs_x (.a(x0), .neg(x_neg), .y(ax));
  sign_conv #(.W(W)) u_abs_y (.a(y0), .neg(y_neg), .y(ay));

  lod #(.W(W)) u_lod_x (.a(ax), .onehot(ohx));
  lod #(.W(W)) u_lod_y (.a(ay), .onehot(ohy));

  priority_encoder #(.W(W), .KW(KW)) u_penc_x (.onehot(ohx), .k(kx), .valid(x_nz));
  priority_encoder #(.W(W), .KW(KW)) u_penc_y (.onehot(ohy), .k(ky), .valid(y_nz));

  // Mantissa: clear the leading one. Zero when Y0 is zero so that PP02 vanishes.
  assign x00    = ax ^ ohx;
  assign x00_in = y_nz ? x00 : '0;

  sign_conv #(.W(W)) u_sign_x00 (.a(x00_in), .neg(x_neg ^ y_neg), .y(x00_signed));

  barrel_shifter #(.IW(W), .OW(2*W), .SW(KW)) u_shift_02 (
    .a  (x00_signed),
    .sh (ky),
    .y  (pp02)
  );

  barrel_shifter #(.IW(W), .OW(2*W), .SW(KW)) u_shift_01 (
    .a  (y0),
    .sh (kx),
    .y  (y0_shifted)
  );

  // sign(X0) * (Y0 << kx); zero when X0 is zero.
  assign y0_gated = x_nz ? y0_shifted : '0;

  sign_conv #(.W(2*W)) u_sign_01 (.a(y0_gated), .neg(x_neg), .y(pp01_u));

  assign pp01 = pp01_u;

endmodule
