// tb_fp16_mac: checks the FP16 MAC (a*b + c, two roundings) against the real-valued
// reference, with operands in the range the MAC OFFSET stage sees.
module tb_fp16_mac;
  import fp16_ref_pkg::*;

  logic [15:0] a, b, c, y;
  int checks = 0, failures = 0;

  fp16_mac dut (.a(a), .b(b), .c(c), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      logic [15:0] exp;
      a = rand_fp16(5, 20);
      b = rand_fp16(8, 22);
      c = (i % 4 == 0) ? 16'd0 : rand_fp16(5, 22);
      #1;
      exp = ref_add(ref_mul(a, b), c);
      checks++;
      if (y !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL mac %h*%h+%h = %h, expected %h", a, b, c, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
