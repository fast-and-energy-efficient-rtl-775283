// fp16_ref_pkg: reference FP16 arithmetic for the testbenches, written with `real`.
//
// fp16_to_real() decodes a binary16 word; real_to_fp16() rounds a real to the nearest
// binary16 value, ties to even, with subnormals and overflow to infinity. Because a sum or
// product of two FP16 numbers is exact in double precision, ref_add/ref_mul give the
// correctly rounded FP16 result independently of the RTL's integer formulation.
package fp16_ref_pkg;

  function automatic real pow2(int e);
    real r;
    r = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) r = r * 2.0;
    else        for (int i = 0; i < -e; i++) r = r / 2.0;
    return r;
  endfunction

  function automatic real fp16_to_real(logic [15:0] h);
    real m;
    int  e;
    e = int'(h[14:10]);
    if (e == 0) m = real'(h[9:0]) * pow2(-24);
    else        m = (1.0 + real'(h[9:0]) / 1024.0) * pow2(e - 15);
    return h[15] ? -m : m;
  endfunction

  function automatic logic [15:0] real_to_fp16(real r);
    logic s;
    real  x, m, frac;
    int   e, fl;
    s = (r < 0.0);
    x = s ? -r : r;
    if (x == 0.0) return {s, 15'd0};
    e = 0;
    while (x >= pow2(e + 1)) e++;
    while (x < pow2(e)) e--;
    if (e < -14) e = -14;
    m    = x / pow2(e - 10);
    fl   = int'($floor(m));
    frac = m - real'(fl);
    if (frac > 0.5 || (frac == 0.5 && (fl % 2) == 1)) fl++;
    if (fl >= 2048) begin
      fl = fl / 2;
      e++;
    end
    if (fl >= 1024) begin
      if (e > 15) return {s, 5'h1F, 10'd0};
      return {s, 5'(e + 15), 10'(fl - 1024)};
    end
    return {s, 5'd0, 10'(fl)};
  endfunction

  function automatic logic is_nan(logic [15:0] h);
    return h[14:10] == 5'h1F && h[9:0] != 0;
  endfunction

  function automatic logic [15:0] ref_add(logic [15:0] a, logic [15:0] b);
    logic [15:0] r;
    if (is_nan(a) || is_nan(b)) return 16'h7E00;
    if (a[14:10] == 5'h1F || b[14:10] == 5'h1F) begin
      if (a[14:10] == 5'h1F && b[14:10] == 5'h1F) return (a[15] == b[15]) ? a : 16'h7E00;
      return (a[14:10] == 5'h1F) ? a : b;
    end
    if (fp16_to_real(a) + fp16_to_real(b) == 0.0) return {a[15] & b[15], 15'd0};
    r = real_to_fp16(fp16_to_real(a) + fp16_to_real(b));
    return r;
  endfunction

  function automatic logic [15:0] ref_mul(logic [15:0] a, logic [15:0] b);
    logic s;
    s = a[15] ^ b[15];
    if (is_nan(a) || is_nan(b)) return 16'h7E00;
    if (a[14:10] == 5'h1F || b[14:10] == 5'h1F) begin
      if (a[14:0] == 0 || b[14:0] == 0) return 16'h7E00;
      return {s, 5'h1F, 10'd0};
    end
    if (a[14:0] == 0 || b[14:0] == 0) return {s, 15'd0};
    return real_to_fp16(fp16_to_real(a) * fp16_to_real(b));
  endfunction

  // Random finite FP16 value with exponent field in [emin, emax].
  function automatic logic [15:0] rand_fp16(int emin, int emax);
    logic [15:0] h;
    h[15]    = 1'($urandom);
    h[14:10] = 5'(emin + ($urandom % (emax - emin + 1)));
    h[9:0]   = 10'($urandom);
    return h;
  endfunction

  // Reference 16-input adder tree, same pairing as the hardware.
  function automatic logic [15:0] ref_tree16(logic [15:0][15:0] x);
    logic [15:0] l1 [8];
    logic [15:0] l2 [4];
    logic [15:0] l3 [2];
    for (int i = 0; i < 8; i++) l1[i] = ref_add(x[2*i], x[2*i+1]);
    for (int i = 0; i < 4; i++) l2[i] = ref_add(l1[2*i], l1[2*i+1]);
    for (int i = 0; i < 2; i++) l3[i] = ref_add(l2[2*i], l2[2*i+1]);
    return ref_add(l3[0], l3[1]);
  endfunction

endpackage
