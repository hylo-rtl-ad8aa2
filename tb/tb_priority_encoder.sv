// tb_priority_encoder: exhaustive self-checking test of the one-hot encoder (W = 14).
// Each one-hot input 2^i must give k = i and valid = 1; the zero input must give
// valid = 0.
module tb_priority_encoder;
  localparam int W  = 14;
  localparam int KW = $clog2(W);

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0]  onehot;
  logic [KW-1:0] k;
  logic          valid;

  priority_encoder #(.W(W)) dut (.onehot(onehot), .k(k), .valid(valid));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < W; i++) begin
      @(negedge clk);
      onehot = W'(1) << i;
      #1;
      checks++;
      if (int'(k) != i || !valid) begin
        failures++;
        $display("FAIL onehot=%b k=%0d valid=%b", onehot, k, valid);
      end
    end
    @(negedge clk);
    onehot = '0;
    #1;
    checks++;
    if (valid) begin
      failures++;
      $display("FAIL zero input gives valid");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
