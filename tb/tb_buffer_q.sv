// tb_buffer_q: loads full tiles (16 entries) and half tiles from the lower and upper half
// of a column for 1..8 groups, and checks both read ports against the expected layout
// (scales in entries 0.., s_i*z_i in entries 8..).
module tb_buffer_q;
  import pim_pkg::*;

  logic       clk = 0, rst_n = 0, load = 0, qhi = 0;
  col_t       col;
  logic [3:0] ngrp;
  logic [2:0] idx;
  logic [15:0] scale, sz;
  int checks = 0, failures = 0;

  buffer_q dut (.clk(clk), .rst_n(rst_n), .load(load), .col(col), .qhi(qhi), .ngrp(ngrp),
                .idx(idx), .scale(scale), .sz(sz));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    col  = '0;
    ngrp = 4'd1;
    idx  = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int ng, base;
      ng = (t % 3 == 0) ? 8 : 1 + (t % 4);          // 8 groups: full tile, else half tile
      for (int k = 0; k < 16; k++) col[16*k +: 16] = 16'($urandom);
      ngrp = 4'(ng);
      qhi  = (ng < 8) ? 1'(t % 2) : 1'b0;
      if (ng == 8 && t % 2 == 1) qhi = 1'b0;
      base = qhi ? 8 : 0;
      @(negedge clk);
      load = 1;
      @(negedge clk);
      load = 0;
      for (int j = 0; j < 8; j++) begin
        logic [15:0] es, ez;
        idx = 3'(j);
        #1;
        es = (j < ng) ? col[16*(base + j) +: 16] : 16'd0;
        ez = (j < ng && base + ng + j < 16) ? col[16*(base + ng + j) +: 16] : 16'd0;
        checks += 2;
        if (scale !== es) failures++;
        if (sz !== ez) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
