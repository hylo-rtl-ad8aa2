// tb_cla_adder: self-checking test of the carry-lookahead adder.
// The 32-bit adder (the width the multiplier uses) gets full carry-chain cases
// (all-ones plus one, alternating patterns) and 10000 random operand pairs with random
// carry in; a 16-bit and a 64-bit instance get random operands as well. {cout, s} must
// equal a + b + cin.
module tb_cla_adder;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] a32, b32, s32;
  logic [15:0] a16, b16, s16;
  logic [63:0] a64, b64, s64;
  logic        cin, co32, co16, co64;

  cla_adder #(.W(32)) dut   (.a(a32), .b(b32), .cin(cin), .s(s32), .cout(co32));
  cla_adder #(.W(16)) dut16 (.a(a16), .b(b16), .cin(cin), .s(s16), .cout(co16));
  cla_adder #(.W(64)) dut64 (.a(a64), .b(b64), .cin(cin), .s(s64), .cout(co64));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [63:0] av, input logic [63:0] bv, input logic c);
    logic [64:0] e64;
    logic [32:0] e32;
    logic [16:0] e16;
    @(negedge clk);
    a64 = av;        b64 = bv;
    a32 = av[31:0];  b32 = bv[31:0];
    a16 = av[15:0];  b16 = bv[15:0];
    cin = c;
    #1;
    e64 = {1'b0, av} + {1'b0, bv} + 65'(c);
    e32 = {1'b0, av[31:0]} + {1'b0, bv[31:0]} + 33'(c);
    e16 = {1'b0, av[15:0]} + {1'b0, bv[15:0]} + 17'(c);
    checks += 3;
    if ({co32, s32} != e32) begin
      failures++;
      $display("FAIL32 %h + %h + %b = %b_%h", av[31:0], bv[31:0], c, co32, s32);
    end
    if ({co16, s16} != e16) failures++;
    if ({co64, s64} != e64) failures++;
  endtask

  initial begin
    apply('1, 64'd1, 1'b0);
    apply('1, '0, 1'b1);
    apply('1, '1, 1'b1);
    apply(64'h5555_5555_5555_5555, 64'haaaa_aaaa_aaaa_aaaa, 1'b1);
    apply('0, '0, 1'b0);
    for (int r = 0; r < 10000; r++) begin
      apply({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
