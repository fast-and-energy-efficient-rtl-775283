// tb_fp16_add: checks the FP16 adder against real-valued reference rounding, over random
// normal operands, operands of very different size, subnormals, cancellation, overflow and
// the special values.
module tb_fp16_add;
  import fp16_ref_pkg::*;

  logic [15:0] a, b, y;
  int checks = 0, failures = 0;

  fp16_add dut (.a(a), .b(b), .y(y));

  task automatic check(logic [15:0] x, logic [15:0] z);
    logic [15:0] exp;
    a = x; b = z;
    #1;
    exp = ref_add(x, z);
    checks++;
    if (y !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL add %h + %h = %h, expected %h", x, z, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) check(rand_fp16(1, 30), rand_fp16(1, 30));
    for (int i = 0; i < 5000; i++) check(rand_fp16(10, 20), rand_fp16(8, 22));
    for (int i = 0; i < 3000; i++) check(rand_fp16(0, 3), rand_fp16(0, 3));
    for (int i = 0; i < 2000; i++) begin
      logic [15:0] x;
      x = rand_fp16(1, 30);
      check(x, {~x[15], x[14:0]});                       // exact cancellation
      check(x, {~x[15], x[14:1], ~x[0]});                // near cancellation
    end
    check(16'h7BFF, 16'h7BFF);   // overflow to +inf
    check(16'h7C00, 16'h3C00);
    check(16'h7C00, 16'hFC00);   // inf - inf
    check(16'h7E00, 16'h3C00);
    check(16'h8000, 16'h8000);
    check(16'h8000, 16'h0000);
    check(16'h3C00, 16'h1000);   // 1 + tiny: rounding
    check(16'h3C00, 16'h1400);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
