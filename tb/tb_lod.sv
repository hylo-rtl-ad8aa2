// tb_lod: exhaustive self-checking test of the leading-one detector (W = 14).
// For every input the output must be 2^floor(log2 a), computed here by a loop, or 0
// for a zero input.
module tb_lod;
  localparam int W = 14;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0] a, onehot;

  lod #(.W(W)) dut (.a(a), .onehot(onehot));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expv;
    for (int v = 0; v < 2**W; v++) begin
      @(negedge clk);
      a = W'(v);
      #1;
      expv = 0;
      for (int pw = 1; pw <= v; pw = pw * 2) expv = pw;
      checks++;
      if (int'(onehot) != expv) begin
        failures++;
        $display("FAIL a=%b onehot=%b", a, onehot);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
