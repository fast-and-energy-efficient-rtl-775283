// sc_controller: command sequencer of the Scale Cascading+ GEMV for one all-bank row.
//
// On start it checks the job (cfg) and, if it is valid, opens the row in all banks, then
// for each of the n_out outputs mapped in the row issues, one operation per cycle at most:
//   CLEAR; LOADQ (read the output's parameter tile; not for FP16);
//   in_chunks COMP steps, one column read every T_CCD cycles, each with the global-buffer
//   row of the same 16 inputs; after the last COMP of every quantization group one GEND,
//   placed in the cycle after that COMP so it hides in the column-to-column gap;
//   FINAL; two drain cycles; then res_valid for one cycle (READRES: the 16 bank results go
//   to the host) followed by T_CCD - 1 idle cycles.
// Finally it precharges the row (no earlier than T_RAS after the activation), waits T_RP
// and pulses done.
// Row mapping (per output o, WC weight columns per output, n outputs in the row):
//   weights of output o, step c:  column o*WC + c / cpc, slice c % cpc (cpc = 1/4/8 for
//   FP16/INT4/INT2); parameter tiles after all weight tiles: column n*WC + o when a tile
//   needs more than 8 entries, else column n*WC + o/2, lower half for even o, upper for odd.
// Timing: the all-bank activation waits 3*T_FAW + T_RCD before the first column read.
// A job is rejected (cfg_err pulse, nothing issued) if g is not 64/128/256, in_chunks is
// not 1..32 or not a whole number of groups (INT modes), or n_out is 0 or does not fit.
// Interface: start is sampled in IDLE; busy is high from start to done. op_out, the bank
// command pulses and the global-buffer read all refer to the same cycle t.
// The step order, the 32-column row, the parameter tiles after the weight tiles and the
// DRAM timings (Table values as parameter defaults) follow the document; the FSM, the
// exact tile placement, the drain and READRES lengths are this design's choice.
module sc_controller
  import pim_pkg::*;
#(
  parameter int T_RCD = 14,
  parameter int T_CCD = 4,
  parameter int T_RAS = 34,
  parameter int T_RP  = 14,
  parameter int T_FAW = 30
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  gemv_cfg_t        cfg,
  output logic             busy,
  output logic             done,
  output logic             cfg_err,
  output pim_op_t          op_out,
  output logic             bank_act,
  output logic             bank_pre,
  output logic             bank_rd,
  output logic [ROW_W-1:0] bank_row,
  output logic [COL_W-1:0] bank_col,
  output logic             gb_rd_en,
  output logic [4:0]       gb_rd_addr,
  output logic             res_valid,
  output logic [3:0]       res_idx
);

  typedef enum logic [3:0] {
    S_IDLE, S_CHECK, S_ACT, S_CLR, S_LOADQ, S_COMP, S_FINAL, S_RES, S_PRE, S_PREW
  } state_e;

  localparam int T_ACT_ALL = 3 * T_FAW + T_RCD;

  state_e     state;
  gemv_cfg_t  c;
  int         wait_cnt;
  int         ras_cnt;
  logic [5:0] step;       // COMP step inside the segment
  logic [3:0] grp;        // group index
  logic [3:0] out_i;      // output index
  logic       gend_pend;
  logic       gend_last;
  logic [2:0] gend_grp;

  // Derived job geometry.
  int gsize_chunks, ngrp, cpc, wcols, pbase;
  logic full_tile;
  always_comb begin
    gsize_chunks = 1 << c.gshift;
    ngrp         = (c.fmt == WFMT_FP16) ? 0 : int'(c.in_chunks) >> c.gshift;
    cpc          = chunks_per_col(c.fmt);
    wcols        = weight_cols(c.fmt, int'(c.in_chunks));
    pbase        = int'(c.n_out) * wcols;
    full_tile    = param_entries(c.asym, ngrp) > QENT / 2;
  end

  function automatic logic cfg_ok(gemv_cfg_t k);
    int ng;
    if (k.in_chunks == 6'd0 || k.in_chunks > 6'(SEG_CHUNKS)) return 1'b0;
    if (k.n_out == 4'd0) return 1'b0;
    if (k.fmt == WFMT_FP16) return int'(k.n_out) * int'(k.in_chunks) <= NUM_COLS;
    if (k.fmt != WFMT_INT4 && k.fmt != WFMT_INT2) return 1'b0;
    if (k.gshift < 3'd2 || k.gshift > 3'd4) return 1'b0;
    if ((int'(k.in_chunks) & ((1 << k.gshift) - 1)) != 0) return 1'b0;
    ng = int'(k.in_chunks) >> k.gshift;
    return int'(k.n_out) <= max_outputs(k.fmt, k.asym, int'(k.in_chunks), ng);
  endfunction

  function automatic pim_op_t mk_op(op_e o, gemv_cfg_t k, logic [2:0] ch, logic [2:0] g,
                                    logic lst, logic hi, int ng);
    pim_op_t r;
    r.op    = o;
    r.fmt   = k.fmt;
    r.asym  = k.asym && (k.fmt != WFMT_FP16);
    r.chunk = ch;
    r.grp   = g;
    r.last  = lst;
    r.qhi   = hi;
    r.ngrp  = 4'(ng);
    return r;
  endfunction

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      c          <= '0;
      wait_cnt   <= 0;
      ras_cnt    <= 0;
      step       <= '0;
      grp        <= '0;
      out_i      <= '0;
      gend_pend  <= 1'b0;
      gend_last  <= 1'b0;
      gend_grp   <= '0;
      done       <= 1'b0;
      cfg_err    <= 1'b0;
      op_out     <= PIM_NOP;
      bank_act   <= 1'b0;
      bank_pre   <= 1'b0;
      bank_rd    <= 1'b0;
      bank_row   <= '0;
      bank_col   <= '0;
      gb_rd_en   <= 1'b0;
      gb_rd_addr <= '0;
      res_valid  <= 1'b0;
      res_idx    <= '0;
    end else begin
      // defaults: single-cycle pulses
      done      <= 1'b0;
      cfg_err   <= 1'b0;
      op_out    <= PIM_NOP;
      bank_act  <= 1'b0;
      bank_pre  <= 1'b0;
      bank_rd   <= 1'b0;
      gb_rd_en  <= 1'b0;
      res_valid <= 1'b0;
      if (ras_cnt < T_RAS) ras_cnt <= ras_cnt + 1;

      // GEND rides in the cycle after a group's last COMP.
      if (gend_pend) begin
        op_out    <= mk_op(OP_GEND, c, 3'd0, gend_grp, gend_last, 1'b0, ngrp);
        gend_pend <= 1'b0;
      end

      if (wait_cnt > 0) begin
        wait_cnt <= wait_cnt - 1;
      end else begin
        case (state)
          S_IDLE: begin
            if (start) begin
              c     <= cfg;
              state <= S_CHECK;
            end
          end
          S_CHECK: begin
            if (!cfg_ok(c)) begin
              cfg_err <= 1'b1;
              state   <= S_IDLE;
            end else begin
              bank_act <= 1'b1;
              bank_row <= c.row;
              ras_cnt  <= 1;
              out_i    <= '0;
              wait_cnt <= T_ACT_ALL - 2;   // CLEAR takes the last cycle before the first read
              state    <= S_CLR;
            end
          end
          S_CLR: begin
            op_out <= mk_op(OP_CLEAR, c, 3'd0, 3'd0, 1'b0, 1'b0, ngrp);
            step   <= '0;
            grp    <= '0;
            state  <= (c.fmt == WFMT_FP16) ? S_COMP : S_LOADQ;
          end
          S_LOADQ: begin
            bank_rd  <= 1'b1;
            bank_col <= full_tile ? COL_W'(pbase + int'(out_i))
                                  : COL_W'(pbase + (int'(out_i) >> 1));
            op_out   <= mk_op(OP_LOADQ, c, 3'd0, 3'd0, 1'b0, !full_tile && out_i[0], ngrp);
            wait_cnt <= T_CCD - 1;
            state    <= S_COMP;
          end
          S_COMP: begin
            bank_rd    <= 1'b1;
            bank_col   <= COL_W'(int'(out_i) * wcols + int'(step) / cpc);
            gb_rd_en   <= 1'b1;
            gb_rd_addr <= step[4:0];
            op_out     <= mk_op(OP_COMP, c, 3'(int'(step) % cpc), 3'd0, 1'b0, 1'b0, ngrp);
            wait_cnt   <= T_CCD - 1;
            step       <= step + 6'd1;
            if (c.fmt != WFMT_FP16 && ((int'(step) + 1) % gsize_chunks) == 0) begin
              gend_pend <= 1'b1;
              gend_grp  <= grp[2:0];
              gend_last <= (int'(grp) == ngrp - 1);
              grp       <= grp + 4'd1;
            end
            if (int'(step) + 1 == int'(c.in_chunks)) state <= S_FINAL;
          end
          S_FINAL: begin
            op_out   <= mk_op(OP_FINAL, c, 3'd0, 3'd0, 1'b0, 1'b0, ngrp);
            wait_cnt <= 2;
            state    <= S_RES;
          end
          S_RES: begin
            res_valid <= 1'b1;
            res_idx   <= out_i;
            wait_cnt  <= T_CCD - 1;
            out_i     <= out_i + 4'd1;
            state     <= (out_i + 4'd1 == c.n_out) ? S_PRE : S_CLR;
          end
          S_PRE: begin
            if (ras_cnt >= T_RAS) begin
              bank_pre <= 1'b1;
              wait_cnt <= T_RP - 1;
              state    <= S_PREW;
            end
          end
          S_PREW: begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  // The GEND slot must not collide with another issued operation.
  initial assert (T_CCD >= 2) else $error("T_CCD must be at least 2");

endmodule
