// tb_booth_pp_gen: self-checking test of the Booth partial-product generator (W = 14).
// Every digit encoding (all eight bit triples, including both zero encodings) is applied
// with the operand extremes and 2000 random operands; the output must equal digit * a.
module tb_booth_pp_gen;
  import hylo_pkg::*;

  localparam int W = 14;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  booth_digit_t          d;
  logic signed [W-1:0]   a;
  logic signed [W+1:0]   pp;

  booth_pp_gen #(.W(W)) dut (.d(d), .a(a), .pp(pp));

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [2:0] t, input logic signed [W-1:0] av);
    int v, expv;
    @(negedge clk);
    v = -2 * int'(t[2]) + int'(t[1]) + int'(t[0]);
    d.neg = t[2];
    d.one = (v == 1 || v == -1);
    d.two = (v == 2 || v == -2);
    a = av;
    #1;
    expv = v * int'(av);
    checks++;
    if (int'(pp) != expv) begin
      failures++;
      $display("FAIL digit=%0d a=%0d pp=%0d exp=%0d", v, av, pp, expv);
    end
  endtask

  initial begin
    logic signed [W-1:0] edges [5] = '{-(2**(W-1)), 2**(W-1) - 1, 0, -1, 1};
    for (int t = 0; t < 8; t++) begin
      foreach (edges[e]) apply(3'(t), edges[e]);
      for (int r = 0; r < 2000; r++) apply(3'(t), W'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
