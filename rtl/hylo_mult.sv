// hylo_mult: HYLO hybrid logarithmic approximate multiplier (N-bit signed, default 16).
//
// Each operand is split into a most significant segment of two bits and a lower
// segment of N-2 bits. The top segment is read as the radix-4 Booth digit of bits
// N-1..N-3, X1 = -2*x[N-1] + x[N-2] + x[N-3] in -2..2, and the lower segment as the signed
// number X0 = x[N-3:0], so that X = X1 * 2^(N-2) + X0 exactly. The product then splits
// into four partial products:
//   X*Y = X1*Y1 * 2^(2(N-2))            PP3: small digit multiplier, exact
//       + (X1*Y0 + Y1*X0) * 2^(N-2)     PP2, PP1: Booth selection, exact
//       + X0*Y0                         PP0: logarithmic approximation (two rows)
// Only the lower-segment product is approximated, which is why the error is small and
// the partial-product array is much smaller than a full radix-4 Booth array (four
// partial products instead of N/2). The five rows are aligned, sign-extended to 2N bits,
// reduced with a Wallace tree of full-adder rows and summed in a carry-lookahead adder.
// The decomposition, the Booth and logarithmic partial products, the Wallace tree and the
// carry-lookahead adder follow the scheme; widths, sign extension and the exact sign
// handling of the logarithmic rows are this design's choices (see the sub-modules).
//
// Interface: x, y (signed N bits) -> p (signed 2N bits). N must be a multiple of 8
// between 8 and 32 (the adder's width limits).
// Timing: purely combinational, no clock and no registers.
module hylo_mult
  import hylo_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic signed [N-1:0]   x,
  input  logic signed [N-1:0]   y,
  output logic signed [2*N-1:0] p
);

  localparam int unsigned L  = N - 2;     // lower-segment width
  localparam int unsigned PW = 2 * N;     // product width

  booth_digit_t           dx, dy;         // X1, Y1
  logic signed [L-1:0]    x0, y0;         // X0, Y0
  logic signed [3:0]      pp3;
  logic signed [L+1:0]    pp2, pp1;
  logic signed [2*L-1:0]  pp01, pp02;
  logic        [PW-1:0]   rows [5];
  logic        [PW-1:0]   sum_row, carry_row;
  logic                   cout_unused;

  assign x0 = x[L-1:0];
  assign y0 = y[L-1:0];

  booth_r4_encoder u_enc_x (.bits(x[N-1:N-3]), .d(dx));
  booth_r4_encoder u_enc_y (.bits(y[N-1:N-3]), .d(dy));

  // PP3 = X1 * Y1
  msb_digit_mult u_pp3 (.dx(dx), .dy(dy), .p(pp3));

  // PP2 = X1 * Y0, PP1 = Y1 * X0
  booth_pp_gen #(.W(L)) u_pp2 (.d(dx), .a(y0), .pp(pp2));
  booth_pp_gen #(.W(L)) u_pp1 (.d(dy), .a(x0), .pp(pp1));

  // PP0 ~ X0 * Y0 = PP01 + PP02
  log_pp_gen #(.W(L)) u_pp0 (.x0(x0), .y0(y0), .pp01(pp01), .pp02(pp02));

  // Align and sign-extend the partial products to the product width.
  always_comb begin
    rows[0] = PW'(pp3) << (2 * L);
    rows[1] = PW'(pp2) << L;
    rows[2] = PW'(pp1) << L;
    rows[3] = PW'(pp01);
    rows[4] = PW'(pp02);
  end

  wallace_tree #(.W(PW)) u_tree (.ops(rows), .sum(sum_row), .carry(carry_row));

  cla_adder #(.W(PW)) u_cla (
    .a    (sum_row),
    .b    (carry_row),
    .cin  (1'b0),
    .s    (p),
    .cout (cout_unused)
  );

endmodule
