// tb_msb_digit_mult: exhaustive self-checking test of the MSS digit multiplier.
// The digits of all 8 x 8 bit-triple pairs are formed in the testbench and the 4-bit
// signed product must equal the product of the digit values.
module tb_msb_digit_mult;
  import hylo_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  booth_digit_t      dx, dy;
  logic signed [3:0] p;

  msb_digit_mult dut (.dx(dx), .dy(dy), .p(p));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic booth_digit_t mk(input logic [2:0] t, output int v);
    booth_digit_t r;
    v = -2 * int'(t[2]) + int'(t[1]) + int'(t[0]);
    r.neg = t[2];
    r.one = (v == 1 || v == -1);
    r.two = (v == 2 || v == -2);
    return r;
  endfunction

  initial begin
    int vx, vy;
    for (int tx = 0; tx < 8; tx++) begin
      for (int ty = 0; ty < 8; ty++) begin
        @(negedge clk);
        dx = mk(3'(tx), vx);
        dy = mk(3'(ty), vy);
        #1;
        checks++;
        if (int'(p) != vx * vy) begin
          failures++;
          $display("FAIL %0d * %0d -> %0d", vx, vy, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
