// newton_mac: the Newton GEMV unit of one bank: 16 FP16 multipliers (SIMD), a 15-adder
// FP16 tree and one accumulating FP16 adder into the Result register.
//
// Stage A (the cycle in_valid is high): the 16 weight/input products are formed and
// registered. Stage B (next cycle): the products are reduced by the tree and added to Result.
// Result can also be cleared or overwritten with load_val; this is how the Scale Cascading+
// MUL SCALE step writes the rescaled partial sum back (y_i = s'w_i.a_i + (s_{i-1}/s_i)y_{i-1}).
// clear and load act on Result in the cycle they are high and take priority over a stage-B
// accumulation; the controller never issues them together.
// Interface: in_valid/w/a at cycle t, Result updated at the end of cycle t+1.
// The multiplier/adder-tree/Result structure follows the document; the two-stage split is
// this design's choice.
module newton_mac
  import pim_pkg::*;
  import fp16_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  fp16_vec_t w,
  input  fp16_vec_t a,
  input  logic      clear,
  input  logic      load,
  input  fp16_t     load_val,
  output fp16_t     result
);

  fp16_vec_t prod, prod_q;
  logic      valid_q;
  fp16_t     tree_sum, acc_next;

  for (genvar i = 0; i < LANES; i++) begin : g_mul
    fp16_mul u_mul (.a(w[i]), .b(a[i]), .y(prod[i]));
  end

  fp16_adder_tree #(.N(LANES)) u_tree (.x(prod_q), .sum(tree_sum));
  fp16_add u_acc (.a(result), .b(tree_sum), .y(acc_next));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_q  <= '0;
      valid_q <= 1'b0;
      result  <= '0;
    end else begin
      valid_q <= in_valid;
      if (in_valid) prod_q <= prod;
      if (clear)        result <= '0;
      else if (load)    result <= load_val;
      else if (valid_q) result <= acc_next;
    end
  end

endmodule
