// tb_global_buffer: writes all 32 rows of 16 FP16 inputs, reads them back in random order
// and checks data and the one-cycle read latency, including a read of a row rewritten just
// before.
module tb_global_buffer;
  import pim_pkg::*;

  logic      clk = 0;
  logic      wr_en = 0, rd_en = 0;
  logic [4:0] wr_addr = 0, rd_addr = 0;
  fp16_vec_t wr_data, rd_data;
  fp16_vec_t model [32];
  int checks = 0, failures = 0;

  global_buffer dut (.clk(clk), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
                     .rd_en(rd_en), .rd_addr(rd_addr), .rd_data(rd_data));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fp16_vec_t rnd();
    fp16_vec_t v;
    for (int i = 0; i < 16; i++) v[i] = 16'($urandom);
    return v;
  endfunction

  initial begin
    wr_data = '0;
    for (int r = 0; r < 32; r++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 5'(r); wr_data = rnd(); model[r] = wr_data;
    end
    @(negedge clk);
    wr_en = 0;
    for (int t = 0; t < 500; t++) begin
      int r;
      r = $urandom % 32;
      if (t % 7 == 0) begin        // rewrite a row then read it
        @(negedge clk);
        wr_en = 1; wr_addr = 5'(r); wr_data = rnd(); model[r] = wr_data;
        @(negedge clk);
        wr_en = 0;
      end
      @(negedge clk);
      rd_en = 1; rd_addr = 5'(r);
      @(negedge clk);
      rd_en = 0;
      checks++;
      if (rd_data !== model[r]) failures++;
      rd_addr = 5'($urandom);      // no read enable: data must hold
      @(negedge clk);
      checks++;
      if (rd_data !== model[r]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
