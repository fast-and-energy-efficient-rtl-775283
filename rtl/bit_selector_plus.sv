// bit_selector_plus: Bit Selector+, picks the low-precision weights one COMP step needs.
//
// A 256-bit column holds 64 INT4 or 128 INT2 weights, i.e. 4 or 8 COMP steps of 16 lanes.
// For INT4 the selector forwards the 64-bit slice col[64*chunk +: 64] (lane i in bits
// [4i+3:4i]); for INT2 it forwards the 32-bit slice col[32*chunk +: 32] (lane i in bits
// [2i+1:2i]) in the low half of the output, the high half being zero. In FP16 mode the
// block is unused and outputs zero. Only the 64 or 32 bits are moved onward, which is what
// saves bus energy.
// Interface: combinational. The 64/32-bit output widths and the role of the block follow
// the document; the slice order inside a column is this design's choice.
module bit_selector_plus
  import pim_pkg::*;
(
  input  col_t        col,
  input  wfmt_e       fmt,
  input  logic [2:0]  chunk,
  output logic [63:0] sel
);

  always_comb begin
    case (fmt)
      WFMT_INT4: sel = col[64*chunk[1:0] +: 64];
      WFMT_INT2: sel = {32'd0, col[32*chunk +: 32]};
      default:   sel = 64'd0;
    endcase
  end

endmodule
