// fp16_adder_tree: balanced binary tree of FP16 adders reducing N values to one.
//
// Level k adds neighbouring pairs of level k-1, so the sum for N = 16 is
// ((x0+x1)+(x2+x3)) + ... with every adder rounding to FP16; N - 1 adders in log2(N) levels.
// Interface: combinational; N must be a power of two. Used for the 15-adder trees of the
// Newton MAC and of the global adder tree.
module fp16_adder_tree
  import fp16_pkg::*;
#(
  parameter int N = 16
) (
  input  logic [N-1:0][15:0] x,
  output fp16_t              sum
);

  localparam int LEVELS = $clog2(N);

  // node[l][i]: value i at level l; level 0 holds the inputs.
  logic [LEVELS:0][N-1:0][15:0] node;

  assign node[0] = x;

  for (genvar l = 1; l <= LEVELS; l++) begin : g_level
    for (genvar i = 0; i < (N >> l); i++) begin : g_add
      fp16_add u_add (.a(node[l-1][2*i]), .b(node[l-1][2*i+1]), .y(node[l][i]));
    end
    for (genvar i = (N >> l); i < N; i++) begin : g_unused
      assign node[l][i] = 16'd0;
    end
  end

  assign sum = node[LEVELS][0];

endmodule
