// tb_sign_conv: exhaustive self-checking test of the sign-conversion block (W = 14).
// Every operand is applied with neg = 0 and neg = 1; the output must equal a or
// 2^W - a (mod 2^W). The absolute value of -2^(W-1), read unsigned, is checked as well.
module tb_sign_conv;
  localparam int W = 14;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0] a, y;
  logic         neg;

  sign_conv #(.W(W)) dut (.a(a), .neg(neg), .y(y));

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expv;
    for (int v = 0; v < 2**W; v++) begin
      for (int n = 0; n < 2; n++) begin
        @(negedge clk);
        a = W'(v);
        neg = n[0];
        #1;
        expv = n ? ((2**W - v) % (2**W)) : v;
        checks++;
        if (int'(y) != expv) begin
          failures++;
          $display("FAIL a=%0d neg=%0d y=%0d exp=%0d", v, n, y, expv);
        end
      end
    end
    @(negedge clk);
    a = W'(2**(W-1));
    neg = 1'b1;
    #1;
    checks++;
    if (int'(y) != 2**(W-1)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
