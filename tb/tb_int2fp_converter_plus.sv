// tb_int2fp_converter_plus: checks every INT4 and INT2 code, signed and unsigned, in every
// lane: the FP16 output must equal w / 2048 exactly.
module tb_int2fp_converter_plus;
  import pim_pkg::*;
  import fp16_ref_pkg::*;

  logic [63:0] sel;
  wfmt_e       fmt;
  logic        is_signed;
  fp16_vec_t   w_fp;
  int checks = 0, failures = 0;

  int2fp_converter_plus dut (.sel(sel), .fmt(fmt), .is_signed(is_signed), .w_fp(w_fp));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      fmt       = (t % 2) ? WFMT_INT2 : WFMT_INT4;
      is_signed = 1'((t / 2) % 2);
      sel       = {$urandom, $urandom};
      if (fmt == WFMT_INT2) sel[63:32] = $urandom;   // upper half must be ignored
      #1;
      for (int l = 0; l < 16; l++) begin
        int  w;
        real exp;
        if (fmt == WFMT_INT4) w = is_signed ? int'($signed(sel[4*l +: 4])) : int'(sel[4*l +: 4]);
        else                  w = is_signed ? int'($signed(sel[2*l +: 2])) : int'(sel[2*l +: 2]);
        exp = real'(w) / 2048.0;
        checks++;
        if (fp16_to_real(w_fp[l]) != exp || (w == 0 && w_fp[l] !== 16'd0)) begin
          failures++;
          if (failures < 10) $display("FAIL lane %0d w=%0d -> %h", l, w, w_fp[l]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
