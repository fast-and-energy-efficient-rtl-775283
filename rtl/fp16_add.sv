// fp16_add: combinational FP16 adder (the FP16 ADD unit, and the building block of the
// adder trees).
//
// Both operands are turned into exact signed integers in units of 2^-24 (the weight of the
// smallest FP16 subnormal); any finite FP16 value fits in 41 bits that way, so the sum is
// exact and is rounded once by fp16_round_pack (nearest, ties to even). Subnormals are
// handled; NaN inputs and inf + (-inf) give the quiet NaN 16'h7E00; an exact zero sum is +0
// unless both operands are -0.
// Interface: y = a + b, no clock, no latency. The document names the FP16 ADD unit but not
// its inside; the exact-integer structure is this design's choice.
module fp16_add
  import fp16_pkg::*;
(
  input  fp16_t a,
  input  fp16_t b,
  output fp16_t y
);

  logic [41:0] ma, mb, mag_hi, mag_lo, mag;
  logic        sa, sb, sbig;

  always_comb begin
    sa  = a[15];
    sb  = b[15];
    ma  = 42'(fp16_sig(a)) << (fp16_eexp(a) - 5'd1);
    mb  = 42'(fp16_sig(b)) << (fp16_eexp(b) - 5'd1);
    if (ma >= mb) begin
      mag_hi = ma; mag_lo = mb; sbig = sa;
    end else begin
      mag_hi = mb; mag_lo = ma; sbig = sb;
    end
    // one adder for both cases: subtraction as addition of the complement
    mag = mag_hi + (mag_lo ^ {42{sa ^ sb}}) + 42'(sa ^ sb);

    if (fp16_is_nan(a) || fp16_is_nan(b)) begin
      y = FP16_QNAN;
    end else if (fp16_is_inf(a) && fp16_is_inf(b)) begin
      y = (sa == sb) ? a : FP16_QNAN;
    end else if (fp16_is_inf(a)) begin
      y = a;
    end else if (fp16_is_inf(b)) begin
      y = b;
    end else if (mag == '0) begin
      y = {sa & sb, 15'd0};
    end else begin
      y = fp16_round_pack(sbig, RP_W'(mag), -24);
    end
  end

endmodule
