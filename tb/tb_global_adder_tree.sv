// tb_global_adder_tree: feeds groups of 4, 8 or 16 input vectors (group sizes 64, 128 and
// 256), clears between groups as the datapath does, and checks Sum result against the
// reference tree sum and accumulation, plus the two-cycle latency.
module tb_global_adder_tree;
  import pim_pkg::*;
  import fp16_ref_pkg::*;

  logic      clk = 0, rst_n = 0, in_valid = 0, clear = 0;
  fp16_vec_t a;
  logic [15:0] sum, model;
  int checks = 0, failures = 0;

  global_adder_tree dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a),
                         .clear(clear), .sum(sum));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < 300; g++) begin
      int n;
      n = 4 << (g % 3);
      model = '0;
      for (int s = 0; s < n; s++) begin
        logic [15:0] prev;
        for (int i = 0; i < 16; i++) a[i] = rand_fp16(9, 16);
        prev = model;
        model = ref_add(model, ref_tree16(a));
        in_valid = 1;
        @(negedge clk);
        in_valid = 0;
        checks++;
        if (sum !== prev) failures++;
        @(negedge clk);
        checks++;
        if (sum !== model) begin
          failures++;
          if (failures < 10) $display("FAIL group %0d step %0d: %h expected %h", g, s, sum, model);
        end
      end
      clear = 1;
      @(negedge clk);
      clear = 0;
      checks++;
      if (sum !== 16'd0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
