// global_adder_tree: the SUM INPUT stage in the DRAM peripheral.
//
// While the PIM units run their MAC steps, the same 16 broadcast inputs enter a 15-adder
// FP16 tree here; the tree output is added into the 16-bit Sum result register, which thus
// holds S(a_i), the sum of the inputs of the current quantization group. At the group's end
// the PIM units read Sum result for MAC OFFSET and the register is cleared for the next group.
// Stage A (cycle in_valid is high): tree sum registered. Stage B (next cycle): added into
// Sum result. clear acts on Sum result in the cycle it is high and wins over an add.
// Interface: in_valid/a at cycle t, sum updated at the end of t+1. One instance serves all
// banks. The tree and Sum result follow the document; the two-stage split is this design's.
module global_adder_tree
  import pim_pkg::*;
  import fp16_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  fp16_vec_t a,
  input  logic      clear,
  output fp16_t     sum
);

  fp16_t part, part_q, sum_next;
  logic  valid_q;

  fp16_adder_tree #(.N(LANES)) u_tree (.x(a), .sum(part));
  fp16_add u_acc (.a(sum), .b(part_q), .y(sum_next));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      part_q  <= '0;
      valid_q <= 1'b0;
      sum     <= '0;
    end else begin
      valid_q <= in_valid;
      if (in_valid) part_q <= part;
      if (clear)        sum <= '0;
      else if (valid_q) sum <= sum_next;
    end
  end

endmodule
