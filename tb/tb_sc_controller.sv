// tb_sc_controller: runs the sequencer through jobs of every weight format, quantization
// mode, group size and number of outputs, plus invalid jobs, and checks
//  - the exact operation stream (CLEAR, LOADQ, COMP, GEND, FINAL) and its fields,
//  - every column address (weight tiles first, parameter tiles after them, half tiles
//    alternating between the lower and upper half of a column) and global-buffer address,
//  - the timing: all-bank activation to first column read = 3*tFAW + tRCD, column reads
//    tCCD apart, GEND in the cycle after a group's last COMP, the per-output cycle count,
//    precharge no earlier than tRAS after activation and done tRP after precharge,
//  - that invalid jobs only raise cfg_err.
module tb_sc_controller;
  import pim_pkg::*;

  localparam int T_RCD = 14, T_CCD = 4, T_RAS = 34, T_RP = 14, T_FAW = 30;

  logic             clk = 0, rst_n = 0, start = 0;
  gemv_cfg_t        cfg;
  logic             busy, done, cfg_err, bank_act, bank_pre, bank_rd, gb_rd_en, res_valid;
  pim_op_t          op;
  logic [ROW_W-1:0] bank_row;
  logic [COL_W-1:0] bank_col;
  logic [4:0]       gb_rd_addr;
  logic [3:0]       res_idx;
  int checks = 0, failures = 0;
  int cyc = 0;

  sc_controller dut (.clk(clk), .rst_n(rst_n), .start(start), .cfg(cfg), .busy(busy),
    .done(done), .cfg_err(cfg_err), .op_out(op), .bank_act(bank_act), .bank_pre(bank_pre),
    .bank_rd(bank_rd), .bank_row(bank_row), .bank_col(bank_col), .gb_rd_en(gb_rd_en),
    .gb_rd_addr(gb_rd_addr), .res_valid(res_valid), .res_idx(res_idx));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 15) $display("FAIL %s: got %0d expected %0d (cycle %0d)", what, got, exp, cyc);
    end
  endtask

  // Run one valid job and check everything the controller emits.
  task automatic run_job(int fmt, bit asym, int gshift, int inch, int nout);
    int gch, ng, cpc, wc, full, pbase;
    int t_act, t_pre, t_last_rd, t_res_prev, n_res, o, step, g, k;
    int exp_col;
    gch   = 1 << gshift;
    ng    = (fmt == 0) ? 0 : inch / gch;
    cpc   = (fmt == 0) ? 1 : (fmt == 1) ? 4 : 8;
    wc    = (inch + cpc - 1) / cpc;
    full  = (asym && 2 * ng > 8);
    pbase = nout * wc;
    cfg.fmt = wfmt_e'(fmt); cfg.asym = asym; cfg.gshift = 3'(gshift);
    cfg.in_chunks = 6'(inch); cfg.n_out = 4'(nout); cfg.row = ROW_W'($urandom);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    // activation
    while (!bank_act) @(negedge clk);
    t_act = cyc;
    expect_eq(int'(bank_row), int'(cfg.row), "row");
    t_last_rd = -1; t_res_prev = -1; n_res = 0;
    for (o = 0; o < nout; o++) begin
      int first_in_output;
      first_in_output = 1;
      // CLEAR
      while (op.op == OP_NOP) @(negedge clk);
      expect_eq(int'(op.op), int'(OP_CLEAR), "clear");
      @(negedge clk);
      if (fmt != 0) begin
        while (op.op == OP_NOP) @(negedge clk);
        expect_eq(int'(op.op), int'(OP_LOADQ), "loadq");
        expect_eq(int'(bank_rd), 1, "loadq rd");
        exp_col = full ? pbase + o : pbase + o / 2;
        expect_eq(int'(bank_col), exp_col, "param column");
        expect_eq(int'(op.qhi), full ? 0 : o % 2, "param half");
        expect_eq(int'(op.ngrp), ng, "ngrp");
        if (t_last_rd < 0) expect_eq(cyc - t_act, 3 * T_FAW + T_RCD, "act to first read");
        t_last_rd = cyc;
        first_in_output = 0;
        @(negedge clk);
      end
      g = 0;
      for (step = 0; step < inch; step++) begin
        while (op.op == OP_NOP) @(negedge clk);
        expect_eq(int'(op.op), int'(OP_COMP), "comp");
        expect_eq(int'(bank_rd) + int'(gb_rd_en), 2, "comp reads");
        expect_eq(int'(bank_col), o * wc + step / cpc, "weight column");
        expect_eq(int'(op.chunk), step % cpc, "chunk");
        expect_eq(int'(gb_rd_addr), step, "gb address");
        expect_eq(int'(op.asym), int'(asym && fmt != 0), "asym flag");
        if (t_last_rd < 0)         expect_eq(cyc - t_act, 3 * T_FAW + T_RCD, "act to first read");
        else if (!first_in_output) expect_eq(cyc - t_last_rd, T_CCD, "column spacing");
        else begin
          checks++;
          if (cyc - t_last_rd < T_CCD) failures++;
        end
        t_last_rd = cyc;
        first_in_output = 0;
        @(negedge clk);
        if (fmt != 0 && (step + 1) % gch == 0) begin
          expect_eq(int'(op.op), int'(OP_GEND), "gend right after comp");
          expect_eq(int'(op.grp), g, "gend group");
          expect_eq(int'(op.last), int'(g == ng - 1), "gend last");
          g++;
          @(negedge clk);
        end
      end
      while (op.op == OP_NOP) @(negedge clk);
      expect_eq(int'(op.op), int'(OP_FINAL), "final");
      while (!res_valid) @(negedge clk);
      expect_eq(int'(res_idx), o, "res index");
      if (t_res_prev >= 0)
        expect_eq(cyc - t_res_prev, 1 + ((fmt != 0) ? T_CCD : 0) + inch * T_CCD + 3 + T_CCD,
                  "cycles per output");
      t_res_prev = cyc;
      n_res++;
      @(negedge clk);
    end
    while (!bank_pre) @(negedge clk);
    t_pre = cyc;
    checks++;
    if (t_pre - t_act < T_RAS) failures++;
    while (!done) @(negedge clk);
    expect_eq(cyc - t_pre, T_RP, "precharge to done");
    expect_eq(n_res, nout, "results");
    @(negedge clk);
    expect_eq(int'(busy), 0, "idle after done");
  endtask

  task automatic bad_job(int fmt, bit asym, int gshift, int inch, int nout);
    int seen_err, seen_cmd;
    cfg.fmt = wfmt_e'(fmt); cfg.asym = asym; cfg.gshift = 3'(gshift);
    cfg.in_chunks = 6'(inch); cfg.n_out = 4'(nout); cfg.row = '0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    seen_err = 0; seen_cmd = 0;
    repeat (10) begin
      if (cfg_err) seen_err++;
      if (bank_act || bank_rd || op.op != OP_NOP) seen_cmd++;
      @(negedge clk);
    end
    expect_eq(seen_err, 1, "cfg_err pulse");
    expect_eq(seen_cmd, 0, "no command on bad job");
  endtask

  initial begin
    cfg = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // FP16: one 512x1 tile per row
    run_job(0, 0, 3, 32, 1);
    // INT4 / INT2, symmetric and asymmetric, g = 64/128/256, full rows
    for (int fmt = 1; fmt <= 2; fmt++)
      for (int a = 0; a < 2; a++)
        for (int gs = 2; gs <= 4; gs++)
          run_job(fmt, a[0], gs, 32, max_outputs(wfmt_e'(fmt), a[0], 32, 32 >> gs));
    // short segments and partly filled rows
    run_job(1, 1, 2, 8, 2);
    run_job(2, 0, 3, 16, 3);
    run_job(0, 0, 2, 8, 4);
    // invalid jobs
    bad_job(2, 1, 2, 32, 7);     // INT2 asym g=64 holds only six outputs
    bad_job(1, 0, 3, 32, 4);     // INT4 holds three
    bad_job(1, 0, 1, 32, 1);     // group size 32 not supported
    bad_job(2, 0, 4, 8, 1);      // segment not a whole number of groups
    bad_job(0, 0, 2, 32, 2);     // FP16 holds one 512 tile
    bad_job(1, 0, 2, 0, 1);      // empty segment
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
