// tb_log_pp_gen: self-checking test of the logarithmic PP0 stage (W = 14).
// Operand extremes, zeros, powers of two and 20000 random pairs are applied. The
// expected rows are computed with integer arithmetic: k = floor(log2 |v|) by a loop,
// PP01 = sign(X0) * Y0 * 2^kx and PP02 = sign(X0*Y0) * (|X0| - 2^kx) * 2^ky, both zero
// when either operand is zero (PP01 also when only X0 is zero).
module tb_log_pp_gen;
  localparam int W = 14;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [W-1:0]   x0, y0;
  logic signed [2*W-1:0] pp01, pp02;

  log_pp_gen #(.W(W)) dut (.x0(x0), .y0(y0), .pp01(pp01), .pp02(pp02));

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int floor_log2(input int v);
    int k = 0;
    while ((v >> (k + 1)) != 0) k++;
    return k;
  endfunction

  task automatic apply(input int xv, input int yv);
    int ax, ay, kx, ky, sx, sp;
    longint e01, e02;
    @(negedge clk);
    x0 = W'(xv);
    y0 = W'(yv);
    #1;
    ax = (xv < 0) ? -xv : xv;
    ay = (yv < 0) ? -yv : yv;
    e01 = 0;
    e02 = 0;
    if (ax != 0) begin
      kx = floor_log2(ax);
      sx = (xv < 0) ? -1 : 1;
      e01 = longint'(sx) * longint'(yv) * (longint'(1) << kx);
      if (ay != 0) begin
        ky = floor_log2(ay);
        sp = ((xv < 0) != (yv < 0)) ? -1 : 1;
        e02 = longint'(sp) * longint'(ax - (1 << kx)) * (longint'(1) << ky);
      end
    end
    checks++;
    if (longint'(pp01) != e01 || longint'(pp02) != e02) begin
      failures++;
      $display("FAIL x0=%0d y0=%0d pp01=%0d/%0d pp02=%0d/%0d", xv, yv, pp01, e01, pp02, e02);
    end
  endtask

  initial begin
    int edges [8] = '{-(2**(W-1)), 2**(W-1) - 1, 0, -1, 1, 2**(W-2), -(2**(W-2)) - 1, 3};
    foreach (edges[i]) foreach (edges[j]) apply(edges[i], edges[j]);
    for (int r = 0; r < 20000; r++) begin
      apply(int'($signed(W'($urandom))), int'($signed(W'($urandom))));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
