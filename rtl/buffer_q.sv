// buffer_q: the 256-bit (16 x 16-bit) quantization parameter buffer of a PIM unit.
//
// Entries 0..7 hold the cascade scales read by the FP16 MUL (s_{i-1}/s_i at the end of
// group i-1, and s_f/s' at the end of the last group); entries 8..15 hold s_i*z_i read by
// the FP16 MAC. The buffer is loaded in one cycle from a 256-bit DRAM column. A parameter
// tile of an output is ngrp scales followed by ngrp s_i*z_i values, starting at 16-bit
// entry 0 of the column (qhi = 0) or at entry 8 (qhi = 1, when two tiles of at most eight
// entries share a column); load places the scales in entries 0.. and the s_i*z_i values in
// entries 8.. . Entries not covered by the tile are cleared.
// Interface: load is sampled on the rising clock edge; the two read ports are
// combinational. Size, split [0:7]/[8:15] and loading from the bank follow the document;
// the tile layout inside the column is this design's choice.
module buffer_q
  import pim_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  col_t       col,
  input  logic       qhi,
  input  logic [3:0] ngrp,
  input  logic [2:0] idx,
  output logic [15:0] scale,
  output logic [15:0] sz
);

  logic [QENT-1:0][15:0] q;
  int                    base;

  assign base = qhi ? QENT / 2 : 0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else if (load) begin
      for (int j = 0; j < QENT / 2; j++) begin
        if (j < int'(ngrp)) begin
          q[j] <= col[16*(base + j) +: 16];
          if (base + int'(ngrp) + j < QENT) q[QENT/2 + j] <= col[16*(base + int'(ngrp) + j) +: 16];
          else                              q[QENT/2 + j] <= 16'd0;
        end else begin
          q[j]          <= 16'd0;
          q[QENT/2 + j] <= 16'd0;
        end
      end
    end
  end

  assign scale = q[idx];
  assign sz    = q[{1'b1, idx}];

endmodule
