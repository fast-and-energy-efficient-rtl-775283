// tb_bit_selector_plus: fills a column with known weights and checks that every INT4 and
// INT2 chunk puts lane i's weight in the right output bits, and that FP16 mode outputs zero.
module tb_bit_selector_plus;
  import pim_pkg::*;

  col_t        col;
  wfmt_e       fmt;
  logic [2:0]  chunk;
  logic [63:0] sel;
  int checks = 0, failures = 0;

  bit_selector_plus dut (.col(col), .fmt(fmt), .chunk(chunk), .sel(sel));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int k = 0; k < 8; k++) col[32*k +: 32] = $urandom;
      // INT4: weight n of the column (n = 16*chunk + lane) sits in bits [4n+3:4n]
      fmt = WFMT_INT4;
      for (int ch = 0; ch < 4; ch++) begin
        chunk = 3'(ch);
        #1;
        for (int l = 0; l < 16; l++) begin
          checks++;
          if (sel[4*l +: 4] !== col[4*(16*ch + l) +: 4]) failures++;
        end
      end
      // INT2: weight n in bits [2n+1:2n]
      fmt = WFMT_INT2;
      for (int ch = 0; ch < 8; ch++) begin
        chunk = 3'(ch);
        #1;
        for (int l = 0; l < 16; l++) begin
          checks++;
          if (sel[2*l +: 2] !== col[2*(16*ch + l) +: 2]) failures++;
        end
        checks++;
        if (sel[63:32] !== 32'd0) failures++;
      end
      fmt = WFMT_FP16;
      #1;
      checks++;
      if (sel !== 64'd0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
