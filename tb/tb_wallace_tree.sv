// tb_wallace_tree: self-checking test of the five-row carry-save reduction (W = 32).
// Random rows, all-ones rows and all-zero rows are applied; sum + carry must equal the
// sum of the five rows modulo 2^32.
module tb_wallace_tree;
  localparam int W = 32;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0] ops [5];
  logic [W-1:0] sum, carry;

  wallace_tree #(.W(W)) dut (.ops(ops), .sum(sum), .carry(carry));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now();
    logic [W-1:0] expv;
    #1;
    expv = '0;
    foreach (ops[i]) expv = expv + ops[i];
    checks++;
    if (W'(sum + carry) != expv) begin
      failures++;
      $display("FAIL sum+carry=%h exp=%h", W'(sum + carry), expv);
    end
  endtask

  initial begin
    @(negedge clk);
    foreach (ops[i]) ops[i] = '1;
    check_now();
    @(negedge clk);
    foreach (ops[i]) ops[i] = '0;
    check_now();
    for (int r = 0; r < 10000; r++) begin
      @(negedge clk);
      foreach (ops[i]) ops[i] = $urandom;
      check_now();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
