// fp16_pkg: IEEE 754 binary16 (FP16) helpers shared by the FP16 arithmetic units.
//
// Every FP16 number is held as a packed 16-bit word {sign, exponent[4:0], fraction[9:0]}.
// fp16_round_pack() is the single rounding step used by the adder and the multiplier: it
// takes an exact unsigned magnitude M and a power-of-two exponent E (value = M * 2^E) and
// returns the nearest FP16 number, ties to even, with subnormals kept and overflow going to
// infinity. The units compute their exact result in integer form and call this once, so each
// operation is correctly rounded. NaN results are the canonical quiet NaN 16'h7E00.
// The number format and rounding mode are this design's choice; the PIM datapath it serves
// only states that its arithmetic units are FP16.
package fp16_pkg;

  typedef logic [15:0] fp16_t;

  localparam fp16_t FP16_QNAN = 16'h7E00;
  localparam int    RP_W      = 48;   // width of the magnitude handed to fp16_round_pack

  function automatic logic fp16_is_nan(fp16_t x);
    return (x[14:10] == 5'h1F) && (x[9:0] != 10'd0);
  endfunction

  function automatic logic fp16_is_inf(fp16_t x);
    return (x[14:10] == 5'h1F) && (x[9:0] == 10'd0);
  endfunction

  // Significand with the hidden bit made explicit (0 for zero and subnormals).
  function automatic logic [10:0] fp16_sig(fp16_t x);
    return {(x[14:10] != 5'd0), x[9:0]};
  endfunction

  // Effective biased exponent: subnormals share the scale of exponent 1.
  // The value of a finite x is fp16_sig(x) * 2^(fp16_eexp(x) - 25).
  function automatic logic [4:0] fp16_eexp(fp16_t x);
    return (x[14:10] == 5'd0) ? 5'd1 : x[14:10];
  endfunction

  // Round sign * mag * 2^e to FP16, round to nearest, ties to even.
  // The magnitude is pre-shifted left by RP_PRE so that a single right shift (never a left
  // one) brings the result's last fraction bit to bit 0; this keeps one shifter in hardware.
  localparam int RP_PRE = 10;
  localparam int RP_XW  = RP_W + RP_PRE;

  function automatic fp16_t fp16_round_pack(logic sign, logic [RP_W-1:0] mag, int e);
    int               p;
    int               sh;
    int               biased;
    logic [RP_XW-1:0] magx;
    logic [RP_XW-1:0] mx;
    logic [RP_XW-1:0] mask;
    logic [11:0]      m;
    logic             rbit;
    logic             sticky;
    fp16_t            r;
    p = 0;
    for (int i = 0; i < RP_W; i++) begin
      if (mag[i]) p = i;
    end
    // sh - RP_PRE is the bit of mag that becomes the last fraction bit: 11 significant bits
    // for a normal result, or the fixed 2^-24 weight of a subnormal one.
    sh = p;
    if (sh < -14 - e) sh = -14 - e;
    if (sh > RP_XW - 1) sh = RP_XW - 1;
    magx   = {mag, {RP_PRE{1'b0}}};
    mx     = magx >> sh;
    mask   = ~({RP_XW{1'b1}} << sh);
    rbit   = |(magx & (mask ^ (mask >> 1)));
    sticky = |(magx & (mask >> 1));
    m      = mx[11:0] + 12'(rbit && (sticky || mx[0]));
    // after rounding, m can reach 2^11: renormalise by one
    biased = sh - RP_PRE + e + 25 + int'(m[11]);
    if (mag == '0) begin
      r = {sign, 15'd0};
    end else if (m[11]) begin
      if (biased >= 31) r = {sign, 5'h1F, 10'd0};
      else              r = {sign, biased[4:0], 10'd0};
    end else if (m[10]) begin
      if (biased >= 31) r = {sign, 5'h1F, 10'd0};
      else              r = {sign, biased[4:0], m[9:0]};
    end else begin
      r = {sign, 5'd0, m[9:0]};
    end
    return r;
  endfunction

endpackage
