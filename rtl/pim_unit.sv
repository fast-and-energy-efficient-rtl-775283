// pim_unit: one bank's PIM unit, the Newton GEMV unit extended for Scale Cascading+.
//
// It follows a 3-step pipeline driven by one operation word per cycle (op_in, cycle t):
//  t+1  the addressed DRAM column (bank_col) and the broadcast inputs (act) arrive.
//       OP_COMP:  Bit Selector+ and INT2FP Converter+ turn the INT4/INT2 slice into 16 FP16
//                 weights s'*w (FP16 weights pass straight through) and the 16 products
//                 are formed (INTFP MAC, stage 1 of the Newton MAC).
//       OP_LOADQ: the column is the parameter tile and is written into buffer_q.
//  t+2  OP_COMP:  products reduced by the adder tree and accumulated into Result.
//       OP_GEND:  end of group i. MUL SCALE: Result * buffer_q[i] goes back into Result
//                 (s_i/s_{i+1}) or, for the last group, into the scaled result (s_f/s').
//                 MAC OFFSET (asymmetric only): mid result += buffer_q[8+i] * sum_in, where
//                 sum_in is S(a_i) from the global adder tree.
//       OP_FINAL: ADD RESULT: out = scaled result + mid result (asymmetric), scaled result
//                 (symmetric) or Result (plain FP16 GEMV).
//       OP_CLEAR: Result, scaled result and mid result cleared.
// Together this evaluates y = (s_f/s') y_f + sum_i s_i z_i S(a_i) with
// y_i = s' w_i.a_i + (s_{i-1}/s_i) y_{i-1}.
// Interface: op_in at t; bank_col and act valid at t+1; sum_in read at t+2; result
// register valid from t+3 after OP_FINAL. The stage contents follow the document's datapath;
// the op encoding, latencies and the one shared FP16 MUL for cascade and final scale are this
// design's choice.
module pim_unit
  import pim_pkg::*;
  import fp16_pkg::*;
#(
  parameter int S_SH = S_PRIME_SH
) (
  input  logic      clk,
  input  logic      rst_n,
  input  pim_op_t   op_in,
  input  col_t      bank_col,
  input  fp16_vec_t act,
  input  fp16_t     sum_in,
  output fp16_t     result
);

  pim_op_t     op_s1, op_s2;
  logic [63:0] wsel;
  fp16_vec_t   w_int_fp, w_fp;
  fp16_t       acc, q_scale, q_sz, mul_y, mac_y, add_y;
  fp16_t       scaled, mid;
  logic        s2_gend, s2_final, s2_clear;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_s1 <= PIM_NOP;
      op_s2 <= PIM_NOP;
    end else begin
      op_s1 <= op_in;
      op_s2 <= op_s1;
    end
  end

  // ---- stage 1: weight path ----
  bit_selector_plus u_bsel (
    .col(bank_col), .fmt(op_s1.fmt), .chunk(op_s1.chunk), .sel(wsel)
  );

  int2fp_converter_plus #(.S_SH(S_SH)) u_i2f (
    .sel(wsel), .fmt(op_s1.fmt), .is_signed(!op_s1.asym), .w_fp(w_int_fp)
  );

  assign w_fp = (op_s1.fmt == WFMT_FP16) ? fp16_vec_t'(bank_col) : w_int_fp;

  buffer_q u_bq (
    .clk(clk), .rst_n(rst_n),
    .load(op_s1.op == OP_LOADQ), .col(bank_col), .qhi(op_s1.qhi), .ngrp(op_s1.ngrp),
    .idx(op_s2.grp), .scale(q_scale), .sz(q_sz)
  );

  // ---- stage 2: accumulate, MUL SCALE, MAC OFFSET, ADD RESULT ----
  assign s2_gend  = (op_s2.op == OP_GEND);
  assign s2_final = (op_s2.op == OP_FINAL);
  assign s2_clear = (op_s2.op == OP_CLEAR);

  newton_mac u_mac (
    .clk(clk), .rst_n(rst_n),
    .in_valid(op_s1.op == OP_COMP), .w(w_fp), .a(act),
    .clear(s2_clear), .load(s2_gend && !op_s2.last), .load_val(mul_y),
    .result(acc)
  );

  fp16_mul u_mul_scale  (.a(acc), .b(q_scale), .y(mul_y));
  fp16_mac u_mac_offset (.a(q_sz), .b(sum_in), .c(mid), .y(mac_y));
  fp16_add u_add_result (.a(scaled), .b(mid), .y(add_y));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scaled <= '0;
      mid    <= '0;
      result <= '0;
    end else begin
      if (s2_clear) begin
        scaled <= '0;
        mid    <= '0;
      end
      if (s2_gend) begin
        if (op_s2.last) scaled <= mul_y;
        if (op_s2.asym) mid    <= mac_y;
      end
      if (s2_final) begin
        if (op_s2.fmt == WFMT_FP16) result <= acc;
        else if (op_s2.asym)        result <= add_y;
        else                        result <= scaled;
      end
    end
  end

endmodule
