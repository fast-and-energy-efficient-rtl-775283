// global_buffer: the input-vector buffer in the DRAM peripheral.
//
// Holds DEPTH FP16 inputs (512 by default) as DEPTH/16 rows of 256 bits. The host writes one
// 256-bit row per cycle; during GEMV one row (16 inputs) per COMP step is read and broadcast
// to every PIM unit and to the global adder tree, so inputs are loaded once and reused for
// every weight tile.
// Interface: synchronous write; registered read, data valid one cycle after rd_en.
// Capacity and broadcast follow the document; the port widths and read latency are this
// design's choice.
module global_buffer
  import pim_pkg::*;
#(
  parameter int DEPTH = SEG_LEN,
  parameter int AW    = $clog2(DEPTH / LANES)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  fp16_vec_t     wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output fp16_vec_t     rd_data
);

  fp16_vec_t mem [DEPTH / LANES];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
