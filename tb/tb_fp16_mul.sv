// tb_fp16_mul: checks the FP16 multiplier against real-valued reference rounding, over random
// normal operands, underflow into subnormals, subnormal inputs, overflow and the special values.
module tb_fp16_mul;
  import fp16_ref_pkg::*;

  logic [15:0] a, b, y;
  int checks = 0, failures = 0;

  fp16_mul dut (.a(a), .b(b), .y(y));

  task automatic check(logic [15:0] x, logic [15:0] z);
    logic [15:0] exp;
    a = x; b = z;
    #1;
    exp = ref_mul(x, z);
    checks++;
    if (y !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL mul %h * %h = %h, expected %h", x, z, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) check(rand_fp16(8, 22), rand_fp16(8, 22));
    for (int i = 0; i < 5000; i++) check(rand_fp16(1, 30), rand_fp16(1, 30));
    for (int i = 0; i < 3000; i++) check(rand_fp16(0, 12), rand_fp16(0, 12));  // underflow
    for (int i = 0; i < 2000; i++) check(rand_fp16(0, 2), rand_fp16(15, 30));  // subnormal input
    check(16'h7BFF, 16'h4000);   // overflow
    check(16'h7C00, 16'h0000);   // inf * 0
    check(16'h7C00, 16'hBC00);
    check(16'h7E00, 16'h3C00);
    check(16'h0001, 16'h3800);   // 2^-24 * 0.5: tie to even -> 0
    check(16'h0003, 16'h3800);   // 1.5 * 2^-24 -> 2 * 2^-24
    check(16'h8000, 16'h3C00);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
