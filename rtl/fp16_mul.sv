// fp16_mul: combinational FP16 multiplier (the FP16 MUL unit, and the sixteen SIMD
// multipliers of the Newton MAC).
//
// The two 11-bit significands (hidden bit explicit) are multiplied exactly into 22 bits,
// the exponents are added, and the product is rounded once to FP16 by fp16_round_pack
// (nearest, ties to even, subnormals kept, overflow to infinity). NaN inputs and 0 * inf
// give the quiet NaN 16'h7E00.
// Interface: y = a * b, no clock, no latency. The document names the unit only; its inside
// is this design's choice.
module fp16_mul
  import fp16_pkg::*;
(
  input  fp16_t a,
  input  fp16_t b,
  output fp16_t y
);

  logic [21:0] prod;
  logic        s;
  int          e;

  always_comb begin
    s    = a[15] ^ b[15];
    prod = fp16_sig(a) * fp16_sig(b);
    e    = int'(fp16_eexp(a)) + int'(fp16_eexp(b)) - 50;
    if (fp16_is_nan(a) || fp16_is_nan(b)) begin
      y = FP16_QNAN;
    end else if (fp16_is_inf(a) || fp16_is_inf(b)) begin
      if ((a[14:0] == 15'd0) || (b[14:0] == 15'd0)) y = FP16_QNAN;
      else                                          y = {s, 5'h1F, 10'd0};
    end else begin
      y = fp16_round_pack(s, RP_W'(prod), e);
    end
  end

endmodule
