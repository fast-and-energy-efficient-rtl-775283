// int2fp_converter_plus: INT2FP Converter+, turns 16 INT4 or INT2 weights into FP16.
//
// Each lane outputs the FP16 value s' * w with the fixed shared scale s' = 2^-S_SH
// (1/2048 by default), so the result is exact and needs no multiplier: the magnitude's
// leading one gives the exponent (p + 15 - S_SH) and the bits below it the fraction.
// Symmetric groups store two's-complement weights (INT4: -8..7, INT2: -2..1);
// asymmetric groups store unsigned weights (INT4: 0..15, INT2: 0..3) whose offset is
// removed later through s_i*z_i.
// Interface: combinational; sel is the Bit Selector+ output, lane i in bits [4i+3:4i]
// (INT4) or [2i+1:2i] (INT2). s' = 1/2048 and the INT4/INT2 support follow the document;
// using the same s' for INT2 and the signed/unsigned split are this design's choice.
module int2fp_converter_plus
  import pim_pkg::*;
#(
  parameter int S_SH = S_PRIME_SH
) (
  input  logic [63:0] sel,
  input  wfmt_e       fmt,
  input  logic        is_signed,
  output fp16_vec_t   w_fp
);

  function automatic logic [15:0] conv(logic [3:0] v, logic neg_ok, logic int2);
    logic       neg;
    logic [4:0] sv;
    logic [4:0] av;
    logic [3:0] mag;
    logic [4:0] ex;
    logic [9:0] fr;
    int         p;
    if (int2) sv = neg_ok ? {{3{v[1]}}, v[1:0]} : {3'b000, v[1:0]};
    else      sv = neg_ok ? {v[3], v} : {1'b0, v};
    neg = sv[4];
    av  = neg ? 5'd0 - sv : sv;
    mag = av[3:0];
    p = 0;
    for (int i = 0; i < 4; i++) if (mag[i]) p = i;
    ex = 5'(p + 15 - S_SH);
    fr = 10'({6'd0, mag} << (10 - p));
    if (mag == 4'd0) return 16'd0;
    return {neg, ex, fr};
  endfunction

  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      if (fmt == WFMT_INT2) w_fp[i] = conv({2'b00, sel[2*i +: 2]}, is_signed, 1'b1);
      else                  w_fp[i] = conv(sel[4*i +: 4], is_signed, 1'b0);
    end
  end

endmodule
