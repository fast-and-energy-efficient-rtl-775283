// dram_bank_model: behavioural model of the NB DRAM banks of a channel, for simulation only.
//
// Each bank is a sparse array of 256-bit columns addressed by {row, column}; unwritten
// columns read as zero. bank_act opens a row in all banks, bank_rd returns the addressed
// column of every bank one cycle later, bank_pre closes the row. The model flags a read with
// no open row, an activation of an already open bank, and column reads closer than T_CCD.
// Commands are ignored while rst_n is low, as the controller's outputs are not yet defined
// before its reset has taken effect. The testbench fills it directly through write_col().
module dram_bank_model
  import pim_pkg::*;
#(
  parameter int NB    = 16,
  parameter int T_CCD = 4
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        bank_act,
  input  logic                        bank_pre,
  input  logic                        bank_rd,
  input  logic [ROW_W-1:0]            bank_row,
  input  logic [COL_W-1:0]            bank_col,
  output logic [NB-1:0][COL_BITS-1:0] bank_rdata,
  output int                          protocol_errors
);

  logic [COL_BITS-1:0] mem [NB][logic [ROW_W+COL_W-1:0]];
  logic                open = 1'b0;
  logic [ROW_W-1:0]    open_row = '0;
  int                  last_rd = -1000;
  int                  cyc = 0;

  initial protocol_errors = 0;

  function automatic void write_col(int b, int row, int col, logic [COL_BITS-1:0] d);
    mem[b][{ROW_W'(row), COL_W'(col)}] = d;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst_n) begin
      open <= 1'b0;
    end else if (bank_act) begin
      if (open) protocol_errors <= protocol_errors + 1;
      open     <= 1'b1;
      open_row <= bank_row;
    end
    if (rst_n && bank_pre) open <= 1'b0;
    if (rst_n && bank_rd) begin
      if (!open || cyc - last_rd < T_CCD) protocol_errors <= protocol_errors + 1;
      last_rd <= cyc;
      for (int b = 0; b < NB; b++) begin
        if (mem[b].exists({open_row, bank_col})) bank_rdata[b] <= mem[b][{open_row, bank_col}];
        else                                     bank_rdata[b] <= '0;
      end
    end
  end

endmodule
