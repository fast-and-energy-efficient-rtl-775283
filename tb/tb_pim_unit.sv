// tb_pim_unit: drives one PIM unit with the operation stream of whole outputs (CLEAR,
// LOADQ, COMP steps, GEND after each group, FINAL), one operation per cycle with no gaps,
// in every mode: FP16, INT4/INT2, symmetric/asymmetric, group sizes 64/128/256 and shorter
// input segments, with parameter tiles in both column halves. Bank columns and inputs are
// applied one cycle after their operation and the group input sum two cycles after GEND,
// as in the channel. The result is compared bit for bit with the reference model, and
// is written by the third clock edge after FINAL is applied, not earlier.
module tb_pim_unit;
  import pim_pkg::*;
  import fp16_ref_pkg::*;
  import scpim_ref_pkg::*;

  logic      clk = 0, rst_n = 0;
  pim_op_t   op_in;
  col_t      bank_col;
  fp16_vec_t act;
  logic [15:0] sum_in, result;
  int checks = 0, failures = 0;
  int n_mode [3][2];

  pim_unit dut (.clk(clk), .rst_n(rst_n), .op_in(op_in), .bank_col(bank_col), .act(act),
                .sum_in(sum_in), .result(result));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Per-cycle stimulus lists.
  pim_op_t     ops  [$];
  logic [255:0] cols [$];
  fp16_vec_t   acts [$];
  logic [15:0] sums [$];

  job_t        j;
  logic [15:0] av [MAXN];

  function automatic pim_op_t mk(op_e o, int fmt, bit asym, int chunk, int grp, bit last,
                                 bit qhi, int ng);
    pim_op_t r;
    r.op = o; r.fmt = wfmt_e'(fmt); r.asym = asym; r.chunk = 3'(chunk); r.grp = 3'(grp);
    r.last = last; r.qhi = qhi; r.ngrp = 4'(ng);
    return r;
  endfunction

  task automatic push(pim_op_t o, logic [255:0] c, fp16_vec_t a, logic [15:0] s);
    ops.push_back(o); cols.push_back(c); acts.push_back(a); sums.push_back(s);
  endtask

  initial begin
    op_in = PIM_NOP; bank_col = '0; act = '0; sum_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 90; t++) begin
      int fmt, gch, inch, ng, cpc, final_idx;
      bit asym, qhi;
      logic [15:0] exp, tile [16];
      logic [255:0] pcol;
      logic [15:0] prev_res;
      fmt  = t % 3;
      asym = (fmt != 0) && ((t / 3) % 2 == 1);
      gch  = 4 << ((t / 6) % 3);
      inch = (t % 5 == 4) ? gch : 32;        // some segments shorter than 512
      make_job(j, fmt, asym, gch, inch);
      for (int n = 0; n < MAXN; n++) av[n] = rand_fp16(12, 16);
      exp = ref_unit(j, av);
      ng  = (fmt == 0) ? 0 : inch / gch;
      cpc = (fmt == 0) ? 1 : (fmt == 1) ? 4 : 8;
      qhi = (2 * ng <= 8 || !asym) ? 1'(t % 2) : 1'b0;
      param_tile(j, tile);
      pcol = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      for (int e = 0; e < 16; e++) begin
        if (qhi && e < 8) pcol[16*(8 + e) +: 16] = tile[e];
        if (!qhi)         pcol[16*e +: 16]       = tile[e];
      end
      ops.delete(); cols.delete(); acts.delete(); sums.delete();
      push(mk(OP_CLEAR, fmt, asym, 0, 0, 0, 0, ng), '0, '0, '0);
      if (fmt != 0) push(mk(OP_LOADQ, fmt, asym, 0, 0, 0, qhi, ng), pcol, '0, '0);
      begin
        logic [15:0] s;
        s = 0;
        for (int c = 0; c < inch; c++) begin
          fp16_vec_t a;
          logic [15:0][15:0] aa;
          for (int l = 0; l < 16; l++) begin
            a[l] = av[16*c + l];
            aa[l] = av[16*c + l];
          end
          push(mk(OP_COMP, fmt, asym, c % cpc, 0, 0, 0, ng), weight_col(j, c / cpc), a, '0);
          s = ref_add(s, ref_tree16(aa));
          if (fmt != 0 && (c + 1) % gch == 0) begin
            push(mk(OP_GEND, fmt, asym, 0, c / gch, (c + 1) == inch, 0, ng), '0, '0, s);
            s = 0;
          end
        end
      end
      push(mk(OP_FINAL, fmt, asym, 0, 0, 0, 0, ng), '0, '0, '0);
      final_idx = ops.size() - 1;
      for (int k = 0; k < 4; k++) push(PIM_NOP, '0, '0, '0);
      prev_res = result;
      // play: op at k, column/inputs at k+1, group sum at k+2
      for (int k = 0; k < ops.size(); k++) begin
        op_in    = ops[k];
        bank_col = (k >= 1) ? cols[k-1] : '0;
        act      = (k >= 1) ? acts[k-1] : '0;
        sum_in   = (k >= 2) ? sums[k-2] : '0;
        @(negedge clk);
        if (k == final_idx + 1) begin       // FINAL in stage 2: result not yet written
          checks++;
          if (result !== prev_res) failures++;
        end
        if (k == final_idx + 2) begin
          checks++;
          n_mode[fmt][asym]++;
          if (result !== exp) begin
            failures++;
            if (failures < 10) $display("FAIL t=%0d fmt=%0d asym=%0d g=%0d: %h expected %h",
                                        t, fmt, asym, 16 * gch, result, exp);
          end
        end
      end
    end
    for (int f = 0; f < 3; f++)
      for (int s = 0; s < 2; s++)
        if (f > 0 || s == 0) begin
          checks++;
          if (n_mode[f][s] == 0) failures++;
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
