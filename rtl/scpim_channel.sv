// scpim_channel: one DRAM-PIM channel running GEMV on FP16, or on INT4/INT2 weights with
// symmetric or asymmetric group-wise quantization, by the Scale Cascading+ method.
//
// Contents: the global buffer and global adder tree of the DRAM peripheral, the command
// sequencer, and NB per-bank PIM units (Newton MAC plus Bit Selector+, INT2FP Converter+,
// buffer_q, FP16 MUL, FP16 MAC with mid result and FP16 ADD). The DRAM banks themselves are
// outside: the channel drives all-bank row commands and a column address, and reads back one
// 256-bit column per bank one cycle after bank_rd.
// Use: the host writes the 512 inputs of a segment into the global buffer (32 writes of 16
// FP16), then pulses start with a job (gemv_cfg_t). For each weight tile mapped in the row
// every bank produces one FP16 output; the NB outputs appear together on res_data for one
// cycle with res_valid, res_idx numbering the tile. Inputs longer than 512 are split into
// segments by the host, which adds the per-segment partial results.
// Interface: single clock, active-low asynchronous reset. Timing parameters default to the
// DRAM values the design was evaluated with (tRCD 14, tCCD_L 4, tRAS 34, tRP 14, tFAW 30).
// The block set and their connection follow the document; the port protocol is this
// design's choice.
module scpim_channel
  import pim_pkg::*;
  import fp16_pkg::*;
#(
  parameter int NB    = 16,
  parameter int T_RCD = 14,
  parameter int T_CCD = 4,
  parameter int T_RAS = 34,
  parameter int T_RP  = 14,
  parameter int T_FAW = 30
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // host: input vector
  input  logic                   gb_wr_en,
  input  logic [4:0]             gb_wr_addr,
  input  fp16_vec_t              gb_wr_data,
  // host: job control and results
  input  logic                   start,
  input  gemv_cfg_t              cfg,
  output logic                   busy,
  output logic                   done,
  output logic                   cfg_err,
  output logic                   res_valid,
  output logic [3:0]             res_idx,
  output logic [NB-1:0][15:0]    res_data,
  // DRAM banks (all-bank commands)
  output logic                   bank_act,
  output logic                   bank_pre,
  output logic                   bank_rd,
  output logic [ROW_W-1:0]       bank_row,
  output logic [COL_W-1:0]       bank_col,
  input  logic [NB-1:0][COL_BITS-1:0] bank_rdata
);

  pim_op_t   op;
  pim_op_t   op_s1, op_s2;
  logic      gb_rd_en;
  logic [4:0] gb_rd_addr;
  fp16_vec_t act;
  fp16_t     sum;

  sc_controller #(
    .T_RCD(T_RCD), .T_CCD(T_CCD), .T_RAS(T_RAS), .T_RP(T_RP), .T_FAW(T_FAW)
  ) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .cfg(cfg),
    .busy(busy), .done(done), .cfg_err(cfg_err), .op_out(op),
    .bank_act(bank_act), .bank_pre(bank_pre), .bank_rd(bank_rd),
    .bank_row(bank_row), .bank_col(bank_col),
    .gb_rd_en(gb_rd_en), .gb_rd_addr(gb_rd_addr),
    .res_valid(res_valid), .res_idx(res_idx)
  );

  global_buffer u_gb (
    .clk(clk), .wr_en(gb_wr_en), .wr_addr(gb_wr_addr), .wr_data(gb_wr_data),
    .rd_en(gb_rd_en), .rd_addr(gb_rd_addr), .rd_data(act)
  );

  // Operation pipeline of the peripheral (the PIM units keep their own copy).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_s1 <= PIM_NOP;
      op_s2 <= PIM_NOP;
    end else begin
      op_s1 <= op;
      op_s2 <= op_s1;
    end
  end

  // SUM INPUT runs only for asymmetric jobs; it is cleared after each group's MAC OFFSET.
  global_adder_tree u_gtree (
    .clk(clk), .rst_n(rst_n),
    .in_valid(op_s1.op == OP_COMP && op_s1.asym), .a(act),
    .clear(op_s2.op == OP_CLEAR || op_s2.op == OP_GEND),
    .sum(sum)
  );

  for (genvar b = 0; b < NB; b++) begin : g_bank
    pim_unit u_pim (
      .clk(clk), .rst_n(rst_n), .op_in(op),
      .bank_col(bank_rdata[b]), .act(act), .sum_in(sum),
      .result(res_data[b])
    );
  end

endmodule
