// scpim_ref_pkg: reference model of one PIM unit's Scale Cascading+ computation and a
// generator of group-wise quantized test jobs, for the PIM unit and channel testbenches.
//
// ref_unit() repeats, with real-valued FP16 rounding, the operation order of the datapath:
// per 16-input step the products s'*w * a, the pairwise tree and the accumulation; at a
// group end the cascade scale (or s_f/s' for the last group) and, for asymmetric groups,
// mid += s_i*z_i * S(a_i) with S(a_i) summed by the same tree; finally scaled + mid.
// ideal_unit() is the plain real-valued sum_i s_i (w_i + z_i) . a_i used to judge accuracy.
package scpim_ref_pkg;
  import fp16_ref_pkg::*;

  localparam int MAXN = 512;

  typedef struct {
    int          fmt;          // 0 FP16, 1 INT4, 2 INT2
    bit          asym;
    int          gchunks;      // group size / 16
    int          in_chunks;
    int          w_int [MAXN]; // quantized weights (INT modes)
    logic [15:0] w_fp  [MAXN]; // FP16 weights (FP16 mode)
    real         s     [8];    // group scales
    real         z     [8];    // group zero-points (0 when symmetric)
    logic [15:0] q     [16];   // buffer_q image: [0..7] cascade scales, [8..15] s_i*z_i
  } job_t;

  function automatic logic [15:0] w_to_fp(int w);
    return real_to_fp16(real'(w) / 2048.0);
  endfunction

  // Fill weights and quantization parameters of one output with random values.
  function automatic void make_job(ref job_t j, input int fmt, input bit asym,
                                   input int gchunks, input int in_chunks);
    int ng, bits;
    j.fmt = fmt; j.asym = asym; j.gchunks = gchunks; j.in_chunks = in_chunks;
    bits = (fmt == 1) ? 4 : 2;
    ng = (fmt == 0) ? 0 : in_chunks / gchunks;
    for (int n = 0; n < MAXN; n++) begin
      if (n < 16 * in_chunks) begin
        if (asym) j.w_int[n] = int'($urandom % (1 << bits));
        else      j.w_int[n] = int'($urandom % (1 << bits)) - (1 << (bits - 1));
        j.w_fp[n] = rand_fp16(10, 15);
      end else begin
        j.w_int[n] = 0;
        j.w_fp[n]  = 16'd0;
      end
    end
    for (int g = 0; g < 8; g++) begin
      // scales spread over roughly a decade, zero-points about -2^(bits-1)
      j.s[g] = fp16_to_real(real_to_fp16((0.002 + 0.02 * real'($urandom % 1000) / 1000.0)));
      j.z[g] = asym ? -(real'(1 << (bits - 1)) + real'($urandom % 3) - 1.0) : 0.0;
    end
    for (int e = 0; e < 16; e++) j.q[e] = 16'd0;
    for (int g = 0; g < ng; g++) begin
      if (g < ng - 1) j.q[g] = real_to_fp16(j.s[g] / j.s[g + 1]);
      else            j.q[g] = real_to_fp16(j.s[g] * 2048.0);     // s_f / s'
      if (asym) j.q[8 + g] = real_to_fp16(j.s[g] * j.z[g]);
    end
  endfunction

  function automatic logic [15:0] ref_unit(const ref job_t j, const ref logic [15:0] act [MAXN]);
    logic [15:0] acc, mid, sum, scaled;
    logic [15:0][15:0] p, av;
    acc = 0; mid = 0; sum = 0; scaled = 0;
    for (int c = 0; c < j.in_chunks; c++) begin
      for (int l = 0; l < 16; l++) begin
        logic [15:0] wv;
        wv    = (j.fmt == 0) ? j.w_fp[16*c + l] : w_to_fp(j.w_int[16*c + l]);
        p[l]  = ref_mul(wv, act[16*c + l]);
        av[l] = act[16*c + l];
      end
      acc = ref_add(acc, ref_tree16(p));
      if (j.asym) sum = ref_add(sum, ref_tree16(av));
      if (j.fmt != 0 && (c + 1) % j.gchunks == 0) begin
        int g;
        g = c / j.gchunks;
        if (c + 1 == j.in_chunks) scaled = ref_mul(acc, j.q[g]);
        else                      acc    = ref_mul(acc, j.q[g]);
        if (j.asym) mid = ref_add(ref_mul(j.q[8 + g], sum), mid);
        sum = 0;
      end
    end
    if (j.fmt == 0) return acc;
    if (j.asym)     return ref_add(scaled, mid);
    return scaled;
  endfunction

  function automatic real ideal_unit(const ref job_t j, const ref logic [15:0] act [MAXN]);
    real y;
    y = 0.0;
    for (int n = 0; n < 16 * j.in_chunks; n++) begin
      if (j.fmt == 0) y += fp16_to_real(j.w_fp[n]) * fp16_to_real(act[n]);
      else            y += j.s[n / (16 * j.gchunks)] * (real'(j.w_int[n]) + j.z[n / (16 * j.gchunks)])
                           * fp16_to_real(act[n]);
    end
    return y;
  endfunction

  // The 256-bit column holding step c's weights of output j (other chunks of the same
  // column are filled from neighbouring steps, as in the row layout).
  function automatic logic [255:0] weight_col(const ref job_t j, input int col_in_tile);
    logic [255:0] col;
    col = '0;
    if (j.fmt == 0) begin
      for (int l = 0; l < 16; l++) col[16*l +: 16] = j.w_fp[16*col_in_tile + l];
    end else if (j.fmt == 1) begin
      for (int n = 0; n < 64; n++) col[4*n +: 4] = 4'(j.w_int[64*col_in_tile + n]);
    end else begin
      for (int n = 0; n < 128; n++) col[2*n +: 2] = 2'(j.w_int[128*col_in_tile + n]);
    end
    return col;
  endfunction

  // Parameter tile of a job: ng scales then ng s_i*z_i values (entries).
  function automatic void param_tile(const ref job_t j, output logic [15:0] t [16]);
    int ng;
    ng = j.in_chunks / j.gchunks;
    for (int e = 0; e < 16; e++) t[e] = 16'd0;
    for (int g = 0; g < ng; g++) begin
      t[g] = j.q[g];
      if (ng + g < 16) t[ng + g] = j.q[8 + g];
    end
  endfunction

endpackage
