// fp16_mac: FP16 multiply-accumulate unit used for the MAC OFFSET stage.
//
// y = (a * b) + c, computed as an FP16 multiply followed by an FP16 add, each rounded to
// nearest even (not fused). In the PIM unit a is the group's s_i*z_i from buffer_q, b the
// group's input sum from the global adder tree and c the running mid result.
// Interface: combinational, no latency. The document names an FP16 MAC unit; whether it
// rounds once or twice is not stated, and two roundings are this design's choice.
module fp16_mac
  import fp16_pkg::*;
(
  input  fp16_t a,
  input  fp16_t b,
  input  fp16_t c,
  output fp16_t y
);

  fp16_t p;

  fp16_mul u_mul (.a(a), .b(b), .y(p));
  fp16_add u_add (.a(p), .b(c), .y(y));

endmodule
