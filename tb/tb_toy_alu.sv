// tb_toy_alu: self-checking test of the toy ALU.
// Checks ALU_ADD against a reference sum (including wrap-around) and ALU_NZ
// (1 when the first input is not 0, else 0, whatever the second input) on
// fixed corner cases and random operands.
module tb_toy_alu;
  import toy_pkg::*;

  alu_op_e op;
  word_t   in1, in2, y;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  toy_alu dut (.op(op), .in1(in1), .in2(in2), .y(y));

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input alu_op_e o, input word_t a, input word_t b);
    word_t exp;
    op = o; in1 = a; in2 = b;
    #1;
    if (o == ALU_ADD) exp = word_t'(64'(a) + 64'(b));
    else              exp = (a == 0) ? 1'b0 : 1'b1;
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL: op=%0d in1=%0h in2=%0h y=%0h expected %0h", o, a, b, y, exp);
    end
  endtask

  initial begin
    try(ALU_ADD, 10, 5);
    try(ALU_ADD, 0, 20);
    try(ALU_ADD, 32'hFFFF_FFFF, 1);
    try(ALU_ADD, 10, 32'hFFFF_FFFE);   // 10 + (-2)
    try(ALU_NZ, 0, 0);
    try(ALU_NZ, 0, 123);
    try(ALU_NZ, 3, 0);
    try(ALU_NZ, 32'h8000_0000, 0);
    for (int i = 0; i < 200; i++) begin
      try(ALU_ADD, $urandom, $urandom);
      try(ALU_NZ, ($urandom_range(0, 3) == 0) ? 0 : $urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
