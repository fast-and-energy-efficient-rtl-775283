// tb_gemv_workload: a whole M x M GEMV (M = 2048 by default) on the channel at its default
// size, as in the kernel evaluation: the same matrix shape is run as FP16 GEMV and as INT4
// and INT2 asymmetric group-wise GEMV with groups of 128. The input vector is split into
// 512-input segments; for each segment every bank processes its share of the M outputs,
// as many weight tiles per row activation as fit, and the host (this testbench) adds the
// per-segment partial results. Each partial result is compared bit for bit with the
// reference model, each final output with the exact real-valued GEMV, and the total cycle
// counts of the three runs are reported together with the speedups over FP16, which must
// exceed 1.
module tb_gemv_workload;
  import pim_pkg::*;
  import fp16_ref_pkg::*;
  import scpim_ref_pkg::*;

  localparam int M  = 2048;
  localparam int NB = 16;

  logic                   clk = 0, rst_n = 0;
  logic                   gb_wr_en = 0;
  logic [4:0]             gb_wr_addr = 0;
  fp16_vec_t              gb_wr_data = '0;
  logic                   start = 0;
  gemv_cfg_t              cfg = '0;
  logic                   busy, done, cfg_err, res_valid;
  logic [3:0]             res_idx;
  logic [NB-1:0][15:0]    res_data;
  logic                   bank_act, bank_pre, bank_rd;
  logic [ROW_W-1:0]       bank_row;
  logic [COL_W-1:0]       bank_col;
  logic [NB-1:0][COL_BITS-1:0] bank_rdata;
  int                     protocol_errors;

  int checks = 0, failures = 0;
  longint cyc = 0;

  scpim_channel dut (
    .clk(clk), .rst_n(rst_n),
    .gb_wr_en(gb_wr_en), .gb_wr_addr(gb_wr_addr), .gb_wr_data(gb_wr_data),
    .start(start), .cfg(cfg), .busy(busy), .done(done), .cfg_err(cfg_err),
    .res_valid(res_valid), .res_idx(res_idx), .res_data(res_data),
    .bank_act(bank_act), .bank_pre(bank_pre), .bank_rd(bank_rd),
    .bank_row(bank_row), .bank_col(bank_col), .bank_rdata(bank_rdata)
  );

  dram_bank_model #(.NB(NB)) u_banks (
    .clk(clk), .rst_n(rst_n), .bank_act(bank_act), .bank_pre(bank_pre), .bank_rd(bank_rd),
    .bank_row(bank_row), .bank_col(bank_col), .bank_rdata(bank_rdata),
    .protocol_errors(protocol_errors)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  job_t        jobs [NB][8];
  logic [15:0] act [MAXN];
  real         y_hw    [NB][M/NB];    // host accumulation of partial results
  real         y_exact [NB][M/NB];
  real         y_mag   [NB][M/NB];
  int          row_next = 0;

  task automatic load_inputs();
    for (int n = 0; n < MAXN; n++) act[n] = rand_fp16(12, 16);
    for (int r = 0; r < 32; r++) begin
      @(negedge clk);
      gb_wr_en = 1; gb_wr_addr = 5'(r);
      for (int l = 0; l < 16; l++) gb_wr_data[l] = act[16*r + l];
    end
    @(negedge clk);
    gb_wr_en = 0;
  endtask

  // One row job: outputs first_out .. first_out+nout-1 of every bank, current segment.
  task automatic row_job(int fmt, int first_out, int nout);
    int cpc, wc, ng, full, pbase, row, nres;
    logic [15:0] tile [16];
    cpc   = (fmt == 0) ? 1 : (fmt == 1) ? 4 : 8;
    wc    = 32 / cpc;
    ng    = (fmt == 0) ? 0 : 4;
    full  = 0;
    pbase = nout * wc;
    row   = row_next++;
    for (int b = 0; b < NB; b++) begin
      for (int o = 0; o < nout; o++) begin
        make_job(jobs[b][o], fmt, fmt != 0, 8, 32);
        for (int k = 0; k < wc; k++) u_banks.write_col(b, row, o * wc + k, weight_col(jobs[b][o], k));
      end
      if (fmt != 0) begin
        for (int o = 0; o < nout; o += 2) begin
          logic [255:0] pc;
          pc = '0;
          param_tile(jobs[b][o], tile);
          for (int e = 0; e < 8; e++) pc[16*e +: 16] = tile[e];
          if (o + 1 < nout) begin
            param_tile(jobs[b][o + 1], tile);
            for (int e = 0; e < 8; e++) pc[16*(8 + e) +: 16] = tile[e];
          end
          u_banks.write_col(b, row, pbase + o / 2, pc);
        end
      end
    end
    cfg.fmt = wfmt_e'(fmt); cfg.asym = (fmt != 0); cfg.gshift = 3'd3;
    cfg.in_chunks = 6'd32; cfg.n_out = 4'(nout); cfg.row = ROW_W'(row);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    nres = 0;
    while (!done) begin
      if (res_valid) begin
        int o;
        o = int'(res_idx);
        for (int b = 0; b < NB; b++) begin
          real mag;
          checks++;
          if (res_data[b] !== ref_unit(jobs[b][o], act)) begin
            failures++;
            if (failures < 10) $display("FAIL partial fmt=%0d bank %0d out %0d", fmt, b, first_out + o);
          end
          y_hw[b][first_out + o]    += fp16_to_real(res_data[b]);
          y_exact[b][first_out + o] += ideal_unit(jobs[b][o], act);
          mag = 0.0;
          for (int n = 0; n < MAXN; n++) begin
            real t;
            t = (fmt == 0) ? fp16_to_real(jobs[b][o].w_fp[n]) * fp16_to_real(act[n])
                           : jobs[b][o].s[n / 128] * (real'(jobs[b][o].w_int[n]) + jobs[b][o].z[n / 128])
                             * fp16_to_real(act[n]);
            mag += (t < 0.0) ? -t : t;
          end
          y_mag[b][first_out + o] += mag;
        end
        nres++;
      end
      @(negedge clk);
    end
    checks++;
    if (nres != nout || cfg_err) failures++;
  endtask

  task automatic run_gemv(int fmt, output longint cycles);
    int per_row;
    longint t0;
    per_row = max_outputs(wfmt_e'(fmt), fmt != 0, 32, 4);
    for (int b = 0; b < NB; b++)
      for (int o = 0; o < M / NB; o++) begin
        y_hw[b][o] = 0.0; y_exact[b][o] = 0.0; y_mag[b][o] = 0.0;
      end
    cycles = 0;
    for (int seg = 0; seg < M / 512; seg++) begin
      load_inputs();            // host time for the input vector is not counted
      t0 = cyc;
      for (int o = 0; o < M / NB; o += per_row)
        row_job(fmt, o, (M / NB - o < per_row) ? M / NB - o : per_row);
      cycles += cyc - t0;
    end
    for (int b = 0; b < NB; b++)
      for (int o = 0; o < M / NB; o++) begin
        real d;
        d = y_hw[b][o] - y_exact[b][o];
        checks++;
        if (d > 0.01 * y_mag[b][o] + 0.01 || -d > 0.01 * y_mag[b][o] + 0.01) begin
          failures++;
          if (failures < 10) $display("FAIL output fmt=%0d bank %0d out %0d: %f vs %f",
                                      fmt, b, o, y_hw[b][o], y_exact[b][o]);
        end
      end
  endtask

  initial begin
    longint c_fp16, c_int4, c_int2;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_gemv(0, c_fp16);
    run_gemv(1, c_int4);
    run_gemv(2, c_int2);
    $display("GEMV %0dx%0d cycles: FP16 %0d, INT4 ASYM g=128 %0d (speedup %.3f), INT2 ASYM g=128 %0d (speedup %.3f)",
             M, M, c_fp16, c_int4, real'(c_fp16) / real'(c_int4), c_int2, real'(c_fp16) / real'(c_int2));
    checks += 3;
    if (c_int4 >= c_fp16) failures++;
    if (c_int2 >= c_int4) failures++;
    if (protocol_errors != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
