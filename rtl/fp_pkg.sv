// fp_pkg: IEEE 754 single-precision arithmetic as functions.
//
// fadd (add or subtract), fmul and fdiv return the result together with
// overflow / underflow flags; the short forms f_add, f_sub, f_mul and f_div return
// only the value. Every function is combinational and synthesizable. The
// number format (sign bit 31, exponent 30..23 with bias 127, fraction
// 22..0 with an implicit one) follows the design description. The
// following choices are this design's own: round to nearest, ties to even;
// zero and denormal inputs read as zero; results below the normal range
// flush to +0 (underflow); results above it saturate to the largest finite
// value of the right sign (overflow); a zero divisor yields +0 with
// div_by_zero set; NaN and infinity are never produced.
// The stand-alone units fp_addsub, fp_mul and fp_div expose these functions
// as modules.
package fp_pkg;
  import ic_pkg::*;

  typedef struct packed {
    fp32_t y;
    logic  overflow;
    logic  underflow;
    logic  div_by_zero;
  } fp_res_t;

  function automatic fp_res_t fadd(input fp32_t a, input fp32_t b, input logic is_sub);
    fp_res_t r;
    logic        sa, sb, sl, ss;
    logic [7:0]  ea, eb, el, es, ediff;
    logic [23:0] ma, mb, ml, ms;
    logic [26:0] ml_ext, ms_ext, ms_sh;   // mantissa << 3 : guard/round/sticky
    logic [27:0] sum;
    logic [4:0]  lz;
    logic [27:0] norm;
    logic signed [10:0] e_res;
    logic [24:0] mant_r;
    logic        round_up, res_sign;
    r = '0;
    sa = a[31];
    sb = b[31] ^ is_sub;
    ea = a[30:23];
    eb = b[30:23];
    ma = (ea == 8'd0) ? 24'd0 : {1'b1, a[22:0]};
    mb = (eb == 8'd0) ? 24'd0 : {1'b1, b[22:0]};

    // order operands by magnitude
    if ({ea, a[22:0]} >= {eb, b[22:0]}) begin
      sl = sa; el = ea; ml = ma; ss = sb; es = eb; ms = mb;
    end else begin
      sl = sb; el = eb; ml = mb; ss = sa; es = ea; ms = ma;
    end
    if (es == 8'd0) es = el;          // zero operand: no shift needed
    ediff  = el - es;
    ml_ext = {ml, 3'b000};
    ms_ext = {ms, 3'b000};
    if (ediff >= 8'd27) begin
      ms_sh = {26'd0, |ms};
    end else begin
      ms_sh = ms_ext >> ediff;
      // sticky: OR of every bit shifted out
      ms_sh[0] = ms_sh[0] | |(ms_ext & ~({27{1'b1}} << ediff));
    end

    if (sl == ss) sum = {1'b0, ml_ext} + {1'b0, ms_sh};
    else          sum = {1'b0, ml_ext} - {1'b0, ms_sh};
    res_sign = sl;

    // leading zero count over the 28-bit sum
    lz = 5'd0;
    for (int i = 0; i <= 27; i++) begin
      if (sum[i]) lz = 5'(27 - i);
    end

    norm = sum << lz;                               // leading one at bit 27
    e_res = $signed({3'b000, el}) + 11'sd1 - $signed({6'd0, lz});

    // norm[27:4] is the 24-bit mantissa, norm[3] guard, norm[2:0] sticky
    round_up = norm[3] & (|norm[2:0] | norm[4]);
    mant_r   = {1'b0, norm[27:4]} + {24'd0, round_up};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      e_res  = e_res + 11'sd1;
    end

    r.overflow  = 1'b0;
    r.underflow = 1'b0;
    if (sum == 28'd0) begin
      r.y = FP_ZERO;
    end else if (e_res <= 0) begin
      r.y = FP_ZERO;
      r.underflow = 1'b1;
    end else if (e_res >= 255) begin
      r.y = {res_sign, 8'hFE, 23'h7F_FFFF};
      r.overflow = 1'b1;
    end else begin
      r.y = {res_sign, e_res[7:0], mant_r[22:0]};
    end
    return r;
  endfunction

  function automatic fp_res_t fmul(input fp32_t a, input fp32_t b);
    fp_res_t r;
    logic [47:0] prod;
    logic [23:0] mant;
    logic        guard, sticky, round_up, sign;
    logic [24:0] mant_r;
    logic signed [10:0] e_res;
    r = '0;
    sign = a[31] ^ b[31];
    prod = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e_res = $signed({3'b000, a[30:23]}) + $signed({3'b000, b[30:23]}) - 11'sd127;
    if (prod[47]) begin
      mant   = prod[47:24];
      guard  = prod[23];
      sticky = |prod[22:0];
      e_res  = e_res + 11'sd1;
    end else begin
      mant   = prod[46:23];
      guard  = prod[22];
      sticky = |prod[21:0];
    end
    round_up = guard & (sticky | mant[0]);
    mant_r   = {1'b0, mant} + {24'd0, round_up};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      e_res  = e_res + 11'sd1;
    end

    r.overflow  = 1'b0;
    r.underflow = 1'b0;
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0) begin
      r.y = FP_ZERO;
    end else if (e_res <= 0) begin
      r.y = FP_ZERO;
      r.underflow = 1'b1;
    end else if (e_res >= 255) begin
      r.y = {sign, 8'hFE, 23'h7F_FFFF};
      r.overflow = 1'b1;
    end else begin
      r.y = {sign, e_res[7:0], mant_r[22:0]};
    end
    return r;
  endfunction

  function automatic fp_res_t fdiv(input fp32_t a, input fp32_t b);
    fp_res_t r;
    logic [26:0] quo;                   // floor(ma * 2^26 / mb), in [2^25, 2^27)
    logic [25:0] rem;
    logic [24:0] den;
    logic [23:0] mant;
    logic        guard, sticky, round_up, sign, rem_nz;
    logic [24:0] mant_r;
    logic signed [10:0] e_res;
    r = '0;
    sign = a[31] ^ b[31];
    den  = {2'b01, b[22:0]};
    // restoring division, one quotient bit per step
    rem  = 26'({2'b01, a[22:0]});
    for (int i = 26; i >= 0; i--) begin
      if (rem >= 26'(den)) begin
        quo[i] = 1'b1;
        rem    = rem - 26'(den);
      end else begin
        quo[i] = 1'b0;
      end
      rem = rem << 1;
    end
    rem_nz = (rem != 26'd0);
    e_res = $signed({3'b000, a[30:23]}) - $signed({3'b000, b[30:23]}) + 11'sd127;
    if (quo[26]) begin
      mant   = quo[26:3];
      guard  = quo[2];
      sticky = |quo[1:0] | rem_nz;
    end else begin
      mant   = quo[25:2];
      guard  = quo[1];
      sticky = quo[0] | rem_nz;
      e_res  = e_res - 11'sd1;
    end
    round_up = guard & (sticky | mant[0]);
    mant_r   = {1'b0, mant} + {24'd0, round_up};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      e_res  = e_res + 11'sd1;
    end

    r.div_by_zero = (b[30:23] == 8'd0);
    r.overflow  = 1'b0;
    r.underflow = 1'b0;
    if (r.div_by_zero || a[30:23] == 8'd0) begin
      r.y = FP_ZERO;
    end else if (e_res <= 0) begin
      r.y = FP_ZERO;
      r.underflow = 1'b1;
    end else if (e_res >= 255) begin
      r.y = {sign, 8'hFE, 23'h7F_FFFF};
      r.overflow = 1'b1;
    end else begin
      r.y = {sign, e_res[7:0], mant_r[22:0]};
    end
    return r;
  endfunction

  function automatic fp32_t f_add(input fp32_t a, input fp32_t b);
    fp_res_t r;
    r = fadd(a, b, 1'b0);
    return r.y;
  endfunction

  function automatic fp32_t f_sub(input fp32_t a, input fp32_t b);
    fp_res_t r;
    r = fadd(a, b, 1'b1);
    return r.y;
  endfunction

  function automatic fp32_t f_mul(input fp32_t a, input fp32_t b);
    fp_res_t r;
    r = fmul(a, b);
    return r.y;
  endfunction

  function automatic fp32_t f_div(input fp32_t a, input fp32_t b);
    fp_res_t r;
    r = fdiv(a, b);
    return r.y;
  endfunction

  function automatic fp32_t f_abs(input fp32_t a);
    return a & FP_ABS_MASK;
  endfunction

endpackage
