// pim_pkg: types and constants shared by the Scale Cascading+ PIM channel.
//
// Geometry follows the Newton-style channel the design extends: a DRAM column read yields
// 256 bits, i.e. sixteen FP16 values, each bank has one PIM unit with sixteen lanes, a row
// holds 32 columns (1 KB) and the global buffer holds 512 FP16 inputs. The command word
// (pim_op_t) and the GEMV configuration word (gemv_cfg_t) are this design's own encoding.
package pim_pkg;

  import fp16_pkg::*;

  localparam int LANES      = 16;      // FP16 lanes per PIM unit / values per column
  localparam int COL_BITS   = 256;     // bits per DRAM column
  localparam int NUM_COLS   = 32;      // columns per DRAM row (1 KB row buffer)
  localparam int COL_W      = 5;       // column address width
  localparam int ROW_W      = 15;      // 32 MB bank / 1 KB rows = 32768 rows
  localparam int SEG_LEN    = 512;     // inputs held by the global buffer
  localparam int SEG_CHUNKS = SEG_LEN / LANES;   // 32 COMP steps per 512 inputs
  localparam int QENT       = 16;      // buffer_q entries of 16 bits
  localparam int MAX_GROUPS = 8;       // 512 / smallest group size (64)
  localparam int S_PRIME_SH = 11;      // s' = 2^-11 = 1/2048

  typedef logic [LANES-1:0][15:0] fp16_vec_t;
  typedef logic [COL_BITS-1:0]    col_t;

  // Weight format held in the DRAM row.
  typedef enum logic [1:0] {
    WFMT_FP16 = 2'd0,
    WFMT_INT4 = 2'd1,
    WFMT_INT2 = 2'd2
  } wfmt_e;

  // Operation that travels down the PIM pipeline, one per cycle.
  typedef enum logic [2:0] {
    OP_NOP   = 3'd0,
    OP_CLEAR = 3'd1,   // clear accumulator, mid result and input sum
    OP_LOADQ = 3'd2,   // load buffer_q from the column being read
    OP_COMP  = 3'd3,   // one 16-lane MAC step (weights from bank, inputs from global buffer)
    OP_GEND  = 3'd4,   // end of a quantization group: MUL SCALE and MAC OFFSET
    OP_FINAL = 3'd5    // ADD RESULT: form the output of this PIM unit
  } op_e;

  typedef struct packed {
    op_e        op;
    wfmt_e      fmt;
    logic       asym;      // zero-point (asymmetric) processing enabled
    logic [2:0] chunk;     // sub-column chunk picked by Bit Selector+
    logic [2:0] grp;       // group index inside the segment
    logic       last;      // last group of the segment (scale is s_f/s')
    logic       qhi;       // parameter tile sits in the upper half of the column
    logic [3:0] ngrp;      // number of groups in the segment
  } pim_op_t;

  localparam pim_op_t PIM_NOP = '{op: OP_NOP, fmt: WFMT_FP16, asym: 1'b0, chunk: 3'd0,
                                  grp: 3'd0, last: 1'b0, qhi: 1'b0, ngrp: 4'd0};

  // GEMV job for one all-bank row activation.
  typedef struct packed {
    wfmt_e            fmt;
    logic             asym;
    logic [2:0]       gshift;     // group size g = 16 << gshift (2: 64, 3: 128, 4: 256)
    logic [5:0]       in_chunks;  // inputs in this segment / 16 (1..32)
    logic [3:0]       n_out;      // outputs (512x1 weight tiles) mapped in the row
    logic [ROW_W-1:0] row;
  } gemv_cfg_t;

  // COMP steps served by one 256-bit column.
  function automatic int chunks_per_col(wfmt_e f);
    case (f)
      WFMT_INT4: return 4;
      WFMT_INT2: return 8;
      default:   return 1;
    endcase
  endfunction

  // Columns taken by one output's weights.
  function automatic int weight_cols(wfmt_e f, int in_chunks);
    return (in_chunks + chunks_per_col(f) - 1) / chunks_per_col(f);
  endfunction

  // buffer_q entries one output needs: one cascade scale per group, plus s_i*z_i when asymmetric.
  function automatic int param_entries(logic asym, int ngrp);
    return asym ? 2 * ngrp : ngrp;
  endfunction

  // Columns a row needs for n_out outputs; parameter tiles of up to 8 entries pack two per column.
  function automatic int row_cols(wfmt_e f, logic asym, int in_chunks, int ngrp, int n_out);
    int pc;
    if (f == WFMT_FP16) return n_out * in_chunks;
    if (param_entries(asym, ngrp) > QENT / 2) pc = n_out;
    else                                      pc = (n_out + 1) / 2;
    return n_out * weight_cols(f, in_chunks) + pc;
  endfunction

  // Largest number of outputs that fit in one 32-column row.
  function automatic int max_outputs(wfmt_e f, logic asym, int in_chunks, int ngrp);
    int best;
    best = 0;
    for (int n = 1; n <= 15; n++) begin
      if (row_cols(f, asym, in_chunks, ngrp, n) <= NUM_COLS) best = n;
    end
    return best;
  endfunction

endpackage
