// tb_barrel_shifter: self-checking test of the signed left shifter (14 -> 28 bits).
// Every shift amount 0..15 is applied with the operand extremes and 1000 random
// operands; the output must equal a * 2^sh in 28-bit two's complement (sh <= 13 cannot
// overflow and is compared as a signed integer).
module tb_barrel_shifter;
  localparam int IW = 14;
  localparam int OW = 28;
  localparam int SW = 4;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [IW-1:0] a;
  logic        [SW-1:0] sh;
  logic signed [OW-1:0] y;

  barrel_shifter #(.IW(IW), .OW(OW), .SW(SW)) dut (.a(a), .sh(sh), .y(y));

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic signed [IW-1:0] av, input int s);
    longint expv;
    @(negedge clk);
    a = av;
    sh = SW'(s);
    #1;
    expv = longint'(av) * (64'sd1 <<< s);
    expv = longint'(OW'(expv));   // wrap to the output width for large shifts
    checks++;
    if (longint'(y) != expv) begin
      failures++;
      $display("FAIL a=%0d sh=%0d y=%0d exp=%0d", av, s, y, expv);
    end
  endtask

  initial begin
    for (int s = 0; s < 2**SW; s++) begin
      apply(-(2**(IW-1)), s);
      apply(2**(IW-1) - 1, s);
      apply(-1, s);
      apply(1, s);
      for (int r = 0; r < 1000; r++) apply(IW'($urandom), s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
