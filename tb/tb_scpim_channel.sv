// tb_scpim_channel: end-to-end test of the channel at its default size (16 banks, 512-input
// global buffer, DRAM timings tRCD 14 / tCCD_L 4 / tRAS 34 / tRP 14 / tFAW 30).
//
// For each job the testbench quantizes random weights group-wise, lays the weight tiles and
// parameter tiles of every bank into a DRAM row of the bank model, writes the inputs into
// the global buffer and starts the channel. Every result of every bank is compared bit for
// bit with the reference model of the datapath, and also with the exact real-valued GEMV
// sum_i s_i (w_i + z_i) . a_i (it must agree to within FP16 accumulation error). Jobs cover
// FP16 GEMV, INT4 and INT2 with symmetric and asymmetric groups of 64, 128 and 256, rows
// filled to the document's limits (INT4: 3, INT2: 7 or 6 outputs), a short segment, a
// 1024-input GEMV split into two segments and summed by the host, and rejected jobs.
// The testbench counts each mechanism (modes, group sizes, cascade rescaling, half and full
// parameter tiles, zero-point offset path, job rejection, multi-segment aggregation) and
// fails if one never occurred. It also checks the cycles from start to done.
module tb_scpim_channel;
  import pim_pkg::*;
  import fp16_ref_pkg::*;
  import scpim_ref_pkg::*;

  localparam int NB = 16;
  localparam int T_RCD = 14, T_CCD = 4, T_RAS = 34, T_RP = 14, T_FAW = 30;

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
  int cyc = 0;

  // mechanism counters
  int n_fmt [3][2];
  int n_gsize [5];
  int n_cascade = 0, n_half_tile = 0, n_full_tile = 0, n_reject = 0, n_short = 0, n_multiseg = 0;

  scpim_channel dut (
    .clk(clk), .rst_n(rst_n),
    .gb_wr_en(gb_wr_en), .gb_wr_addr(gb_wr_addr), .gb_wr_data(gb_wr_data),
    .start(start), .cfg(cfg), .busy(busy), .done(done), .cfg_err(cfg_err),
    .res_valid(res_valid), .res_idx(res_idx), .res_data(res_data),
    .bank_act(bank_act), .bank_pre(bank_pre), .bank_rd(bank_rd),
    .bank_row(bank_row), .bank_col(bank_col), .bank_rdata(bank_rdata)
  );

  dram_bank_model #(.NB(NB), .T_CCD(T_CCD)) u_banks (
    .clk(clk), .rst_n(rst_n), .bank_act(bank_act), .bank_pre(bank_pre), .bank_rd(bank_rd),
    .bank_row(bank_row), .bank_col(bank_col), .bank_rdata(bank_rdata),
    .protocol_errors(protocol_errors)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  job_t        jobs [NB][8];
  logic [15:0] act [MAXN];

  task automatic load_inputs(int emin, int emax);
    for (int n = 0; n < MAXN; n++) act[n] = rand_fp16(emin, emax);
    for (int r = 0; r < 32; r++) begin
      @(negedge clk);
      gb_wr_en = 1; gb_wr_addr = 5'(r);
      for (int l = 0; l < 16; l++) gb_wr_data[l] = act[16*r + l];
    end
    @(negedge clk);
    gb_wr_en = 0;
  endtask

  // Build the row of every bank for nout outputs; outputs o of bank b get jobs[b][o].
  task automatic fill_row(int row, int fmt, bit asym, int gch, int inch, int nout);
    int cpc, wc, ng, pbase;
    logic full;
    logic [15:0] tile [16];
    cpc   = (fmt == 0) ? 1 : (fmt == 1) ? 4 : 8;
    wc    = (inch + cpc - 1) / cpc;
    ng    = (fmt == 0) ? 0 : inch / gch;
    full  = asym && 2 * ng > 8;
    pbase = nout * wc;
    for (int b = 0; b < NB; b++) begin
      for (int o = 0; o < nout; o++) begin
        make_job(jobs[b][o], fmt, asym, gch, inch);
        for (int k = 0; k < wc; k++) u_banks.write_col(b, row, o * wc + k, weight_col(jobs[b][o], k));
      end
      if (fmt != 0) begin
        for (int o = 0; o < nout; o += (full ? 1 : 2)) begin
          logic [255:0] pc;
          pc = '0;
          param_tile(jobs[b][o], tile);
          for (int e = 0; e < 16; e++) if (full || e < 8) pc[16*e +: 16] = tile[e];
          if (!full && o + 1 < nout) begin
            param_tile(jobs[b][o + 1], tile);
            for (int e = 0; e < 8; e++) pc[16*(8 + e) +: 16] = tile[e];
          end
          u_banks.write_col(b, row, full ? pbase + o : pbase + o / 2, pc);
        end
      end
    end
    if (fmt != 0) begin
      if (full) n_full_tile += nout;
      else      n_half_tile += nout;
      if (ng > 1) n_cascade += nout * (ng - 1);
    end
  endtask

  // Run one job and check all results; partial[b][o] returns the results as reals and
  // partial_mag[b][o] the sum of the magnitudes of their terms (the scale of rounding error).
  real partial [NB][8];
  real partial_mag [NB][8];
  task automatic run_job(int row, int fmt, bit asym, int gshift, int inch, int nout);
    int gch, nres, t0, exp_cycles, per_out;
    gch = 1 << gshift;
    fill_row(row, fmt, asym, gch, inch, nout);
    cfg.fmt = wfmt_e'(fmt); cfg.asym = asym; cfg.gshift = 3'(gshift);
    cfg.in_chunks = 6'(inch); cfg.n_out = 4'(nout); cfg.row = ROW_W'(row);
    @(negedge clk);
    start = 1;
    t0 = cyc;
    @(negedge clk);
    start = 0;
    nres = 0;
    while (!done) begin
      if (res_valid) begin
        int o;
        o = int'(res_idx);
        for (int b = 0; b < NB; b++) begin
          logic [15:0] exp;
          real ideal, mag, tol;
          exp = ref_unit(jobs[b][o], act);
          checks++;
          if (res_data[b] !== exp) begin
            failures++;
            if (failures < 10) $display("FAIL fmt=%0d asym=%0d g=%0d bank %0d out %0d: %h expected %h",
                                        fmt, asym, 16 * gch, b, o, res_data[b], exp);
          end
          ideal = ideal_unit(jobs[b][o], act);
          mag = 0.0;
          for (int n = 0; n < 16 * inch; n++) begin
            real term;
            if (fmt == 0) term = fp16_to_real(jobs[b][o].w_fp[n]) * fp16_to_real(act[n]);
            else term = jobs[b][o].s[n / (16 * gch)] *
                        (real'(jobs[b][o].w_int[n]) + jobs[b][o].z[n / (16 * gch)]) * fp16_to_real(act[n]);
            mag += (term < 0.0) ? -term : term;
          end
          tol = 0.01 * mag + 0.001;
          checks++;
          if ((fp16_to_real(res_data[b]) - ideal > tol) || (ideal - fp16_to_real(res_data[b]) > tol)) begin
            failures++;
            if (failures < 10) $display("FAIL accuracy bank %0d out %0d: %f vs exact %f", b, o,
                                        fp16_to_real(res_data[b]), ideal);
          end
          partial[b][o] = fp16_to_real(res_data[b]);
          partial_mag[b][o] = mag;
        end
        nres++;
      end
      @(negedge clk);
    end
    expect_eq(nres, nout, "number of results");
    // start is sampled one cycle after it is raised (CHECK), activation there, then outputs
    per_out    = 1 + ((fmt != 0) ? T_CCD : 0) + inch * T_CCD + 3 + T_CCD;
    exp_cycles = 2 + (3 * T_FAW + T_RCD - 1) + nout * per_out + T_RP;
    expect_eq(cyc - t0, exp_cycles, "start to done cycles");
    n_fmt[fmt][asym]++;
    if (fmt != 0) n_gsize[gshift]++;
    if (inch < 32) n_short++;
  endtask

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic bad_job(int fmt, bit asym, int gshift, int inch, int nout);
    int seen;
    cfg.fmt = wfmt_e'(fmt); cfg.asym = asym; cfg.gshift = 3'(gshift);
    cfg.in_chunks = 6'(inch); cfg.n_out = 4'(nout); cfg.row = '0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    seen = 0;
    repeat (6) begin
      if (cfg_err) seen++;
      if (bank_act) seen += 100;
      @(negedge clk);
    end
    expect_eq(seen, 1, "job rejected");
    if (seen == 1) n_reject++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_inputs(12, 16);
    // FP16 GEMV, one 512x1 tile per row
    run_job(1, 0, 0, 3, 32, 1);
    // INT4/INT2, SYM/ASYM, g = 64/128/256, rows filled to capacity
    for (int fmt = 1; fmt <= 2; fmt++)
      for (int a = 0; a < 2; a++)
        for (int gs = 2; gs <= 4; gs++)
          run_job(2 + 6 * fmt + 3 * a + gs, fmt, a[0], gs, 32,
                  max_outputs(wfmt_e'(fmt), a[0], 32, 32 >> gs));
    // segment shorter than 512 inputs
    run_job(40, 2, 1, 2, 8, 2);
    // rejected jobs
    bad_job(2, 1, 2, 32, 7);
    bad_job(1, 1, 1, 32, 1);
    // 1024-input GEMV: two segments of 512 inputs in two rows, summed by the host
    begin
      real seg0 [NB][8];
      real seg0_mag [NB][8];
      real ideal_total;
      job_t keep [NB][3];
      logic [15:0] act0 [MAXN];
      run_job(50, 1, 1, 3, 32, 3);
      for (int b = 0; b < NB; b++) for (int o = 0; o < 3; o++) begin
        seg0[b][o] = partial[b][o];
        seg0_mag[b][o] = partial_mag[b][o];
        keep[b][o] = jobs[b][o];
      end
      act0 = act;
      load_inputs(12, 16);
      run_job(51, 1, 1, 3, 32, 3);
      for (int b = 0; b < NB; b++) for (int o = 0; o < 3; o++) begin
        real total, mag;
        total = seg0[b][o] + partial[b][o];
        ideal_total = ideal_unit(keep[b][o], act0) + ideal_unit(jobs[b][o], act);
        mag = seg0_mag[b][o] + partial_mag[b][o];
        checks++;
        if (total - ideal_total > 0.01 * mag + 0.002 || ideal_total - total > 0.01 * mag + 0.002) begin
          failures++;
          $display("FAIL 1024-input output: %f vs %f", total, ideal_total);
        end
      end
      n_multiseg++;
    end
    // DRAM command rules seen by the bank model
    expect_eq(protocol_errors, 0, "DRAM protocol errors");
    // every mechanism happened
    for (int f = 0; f < 3; f++)
      for (int s = 0; s < 2; s++)
        if (f > 0 || s == 0) expect_eq(int'(n_fmt[f][s] > 0), 1, "mode exercised");
    for (int gs = 2; gs <= 4; gs++) expect_eq(int'(n_gsize[gs] > 0), 1, "group size exercised");
    expect_eq(int'(n_cascade > 0), 1, "cascade rescale");
    expect_eq(int'(n_half_tile > 0), 1, "half parameter tile");
    expect_eq(int'(n_full_tile > 0), 1, "full parameter tile");
    expect_eq(int'(n_reject > 0), 1, "job rejection");
    expect_eq(int'(n_short > 0), 1, "short segment");
    expect_eq(int'(n_multiseg > 0), 1, "multi-segment");
    $display("mechanisms: cascade=%0d half_tiles=%0d full_tiles=%0d rejects=%0d short=%0d multiseg=%0d",
             n_cascade, n_half_tile, n_full_tile, n_reject, n_short, n_multiseg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
