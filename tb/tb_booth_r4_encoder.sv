// tb_booth_r4_encoder: exhaustive self-checking test of the radix-4 Booth recoder.
// All eight bit triples are applied; the digit read back from the neg/one/two selects
// must equal -2*b2 + b1 + b0, and `one` and `two` must never be set together.
module tb_booth_r4_encoder;
  import hylo_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [2:0]   bits;
  booth_digit_t d;

  booth_r4_encoder dut (.bits(bits), .d(d));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expv, gotv;
    for (int t = 0; t < 8; t++) begin
      @(negedge clk);
      bits = 3'(t);
      #1;
      expv = -2 * int'(bits[2]) + int'(bits[1]) + int'(bits[0]);
      gotv = d.two ? 2 : (d.one ? 1 : 0);
      if (d.neg) gotv = -gotv;
      checks++;
      if (gotv != expv || (d.one && d.two)) begin
        failures++;
        $display("FAIL bits=%b neg=%b one=%b two=%b exp=%0d", bits, d.neg, d.one, d.two, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
