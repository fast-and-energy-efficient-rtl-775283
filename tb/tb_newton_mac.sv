// tb_newton_mac: drives random 16-lane weight/input vectors, back to back and with gaps,
// interleaved with clear and load, and checks Result against a reference that forms the
// 16 products, the same pairwise adder tree and the accumulation with real-valued FP16
// rounding. It also checks the two-cycle latency: Result must be unchanged one edge after
// a step and updated after the second.
module tb_newton_mac;
  import pim_pkg::*;
  import fp16_ref_pkg::*;

  logic      clk = 0, rst_n = 0;
  logic      in_valid = 0, clear = 0, load = 0;
  fp16_vec_t w, a;
  logic [15:0] load_val, result;
  logic [15:0] model;
  logic [15:0] pending [$];
  int checks = 0, failures = 0;

  newton_mac dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .w(w), .a(a),
                  .clear(clear), .load(load), .load_val(load_val), .result(result));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] step_ref(logic [15:0] acc, fp16_vec_t wv, fp16_vec_t av);
    logic [15:0][15:0] p;
    for (int i = 0; i < 16; i++) p[i] = ref_mul(wv[i], av[i]);
    return ref_add(acc, ref_tree16(p));
  endfunction

  task automatic chk(logic [15:0] exp, string what);
    checks++;
    if (result !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: result %h expected %h", what, result, exp);
    end
  endtask

  initial begin
    w = '0; a = '0; load_val = '0; model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int kind;
      kind = $urandom % 10;
      if (kind < 7) begin
        logic [15:0] prev;
        for (int i = 0; i < 16; i++) begin
          w[i] = rand_fp16(3, 14);         // s'-scaled weights are small
          a[i] = rand_fp16(10, 17);
        end
        prev  = model;
        model = step_ref(model, w, a);
        in_valid = 1;
        @(negedge clk);
        in_valid = 0;
        chk(prev, "latency");               // one edge later: unchanged
        if (kind < 3) begin                 // back-to-back second step
          for (int i = 0; i < 16; i++) begin
            w[i] = rand_fp16(3, 14);
            a[i] = rand_fp16(10, 17);
          end
          in_valid = 1;
          @(negedge clk);
          in_valid = 0;
          chk(model, "pipelined");
          model = step_ref(model, w, a);
        end
        @(negedge clk);
        chk(model, "accumulate");
      end else if (kind < 9) begin
        load_val = rand_fp16(8, 20);
        load = 1;
        model = load_val;
        @(negedge clk);
        load = 0;
        chk(model, "load");
      end else begin
        clear = 1;
        model = '0;
        @(negedge clk);
        clear = 0;
        chk(model, "clear");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
