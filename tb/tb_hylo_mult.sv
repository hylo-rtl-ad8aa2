// tb_hylo_mult: end-to-end self-checking test of the 16-bit HYLO multiplier at its
// default parameters.
//
// A reference model written with plain integer arithmetic computes the approximate
// product from the decomposition X = X1*2^14 + X0 (X1 the Booth digit of bits 15..13,
// X0 bits 13..0 signed):
//   X1*Y1*2^28 + (X1*Y0 + Y1*X0)*2^14 + sign(X0)*Y0*2^kx + sign(X0*Y0)*(|X0|-2^kx)*2^ky
// and the design must match it bit for bit. Corner operands (extremes, zeros, powers
// of two) come first, then 10000 random operand pairs, the size of the random vector
// set used to characterise the multiplier. Further checks:
//   - when X0 or Y0 is zero or a power of two in magnitude, the logarithmic term is exact
//     and the product must equal X*Y;
//   - the mean relative error over the random set must stay below 4.13 %, the figure
//     reported for this multiplier.
// Each mechanism is counted (every MSS digit value of both operands, zero lower
// segments, each sign combination of X0 and Y0, a vanishing mantissa X00, a non-zero
// PP3) and one that never occurs counts as a failure.
module tb_hylo_mult;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [15:0] x, y;
  logic signed [31:0] p;

  hylo_mult dut (.x(x), .y(y), .p(p));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cnt_dx [5];      // X1 = -2..2
  int cnt_dy [5];      // Y1 = -2..2
  int cnt_x0_zero, cnt_y0_zero, cnt_x00_zero, cnt_pp3;
  int cnt_sign [4];    // {X0 < 0, Y0 < 0}
  int cnt_exact;

  function automatic int floor_log2(input int v);
    int k = 0;
    while ((v >> (k + 1)) != 0) k++;
    return k;
  endfunction

  // Booth digit of the top three bits and the signed 14-bit lower segment.
  function automatic void split(input int v, output int d, output int lo);
    int u = v & 32'hffff;
    d  = -2 * ((u >> 15) & 1) + ((u >> 14) & 1) + ((u >> 13) & 1);
    lo = u & 32'h3fff;
    if (lo >= 8192) lo -= 16384;
  endfunction

  function automatic longint model(input int xv, input int yv);
    int x1, y1, x0, y0, ax, ay, kx, ky;
    longint r;
    split(xv, x1, x0);
    split(yv, y1, y0);
    r = longint'(x1 * y1) * (longint'(1) << 28) + longint'(x1 * y0 + y1 * x0) * (longint'(1) << 14);
    ax = (x0 < 0) ? -x0 : x0;
    ay = (y0 < 0) ? -y0 : y0;
    if (ax != 0) begin
      kx = floor_log2(ax);
      r += ((x0 < 0) ? -1 : 1) * longint'(y0) * (longint'(1) << kx);
      if (ay != 0) begin
        ky = floor_log2(ay);
        r += (((x0 < 0) != (y0 < 0)) ? -1 : 1) * longint'(ax - (1 << kx)) * (longint'(1) << ky);
      end
    end
    return r;
  endfunction

  real rel_sum = 0.0;
  int  rel_n = 0;

  task automatic apply(input int xv, input int yv, input bit in_mre);
    int x1, y1, x0, y0, ax, ay;
    longint expv, exact;
    @(negedge clk);
    x = 16'(xv);
    y = 16'(yv);
    #1;
    split(int'(x), x1, x0);
    split(int'(y), y1, y0);
    expv  = model(int'(x), int'(y));
    exact = longint'(x) * longint'(y);
    checks++;
    if (longint'(p) != expv) begin
      failures++;
      $display("FAIL x=%0d y=%0d p=%0d exp=%0d", x, y, p, expv);
    end
    ax = (x0 < 0) ? -x0 : x0;
    ay = (y0 < 0) ? -y0 : y0;
    // Power-of-two or zero lower segments make the logarithmic term exact.
    if ((ax & (ax - 1)) == 0 || (ay & (ay - 1)) == 0) begin
      checks++;
      if (longint'(p) != exact) begin
        failures++;
        $display("FAIL exact case x=%0d y=%0d p=%0d exact=%0d", x, y, p, exact);
      end
    end
    cnt_dx[x1 + 2]++;
    cnt_dy[y1 + 2]++;
    if (x0 == 0) cnt_x0_zero++;
    if (y0 == 0) cnt_y0_zero++;
    if (ax != 0 && (ax & (ax - 1)) == 0) cnt_x00_zero++;
    if (x1 * y1 != 0) cnt_pp3++;
    cnt_sign[{x0 < 0, y0 < 0}]++;
    if (longint'(p) == exact) cnt_exact++;
    if (in_mre && exact != 0) begin
      rel_sum += ((real'(p) > real'(exact)) ? real'(p) - real'(exact) : real'(exact) - real'(p))
                 / ((exact < 0) ? -real'(exact) : real'(exact));
      rel_n++;
    end
  endtask

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else begin
      $display("  %-28s %0d", what, n);
    end
  endtask

  initial begin
    int edges [10] = '{-32768, 32767, 0, -1, 1, 8192, -8192, 16384, 12345, -24576};
    real mre;
    foreach (edges[i]) foreach (edges[j]) apply(edges[i], edges[j], 1'b0);
    for (int r = 0; r < 10000; r++) apply(int'($signed(16'($urandom))), int'($signed(16'($urandom))), 1'b1);

    mre = 100.0 * rel_sum / real'(rel_n);
    $display("mean relative error over %0d random pairs: %0.3f %%", rel_n, mre);
    checks++;
    if (mre >= 4.13) begin
      failures++;
      $display("FAIL mean relative error %0.3f %% not below 4.13 %%", mre);
    end
    $display("mechanisms exercised:");
    for (int d = 0; d < 5; d++) need($sformatf("X1 digit %0d", d - 2), cnt_dx[d]);
    for (int d = 0; d < 5; d++) need($sformatf("Y1 digit %0d", d - 2), cnt_dy[d]);
    need("X0 zero", cnt_x0_zero);
    need("Y0 zero", cnt_y0_zero);
    need("X00 zero (|X0| power of 2)", cnt_x00_zero);
    need("PP3 non-zero", cnt_pp3);
    need("X0>=0, Y0>=0", cnt_sign[0]);
    need("X0>=0, Y0<0", cnt_sign[1]);
    need("X0<0, Y0>=0", cnt_sign[2]);
    need("X0<0, Y0<0", cnt_sign[3]);
    need("product exact", cnt_exact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
