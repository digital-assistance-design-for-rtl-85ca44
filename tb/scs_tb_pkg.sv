// scs_tb_pkg: testbench helpers for the outphasing baseband.
//
// - pwl_fit() computes the {b, k, S} word of one interval of a PWL LUT from the
//   real-valued target function: a least-squares line over the interval
//   (k_real, b_real), b quantized down to its B_W most significant bits, k
//   rounded to KF fraction bits and S = (b - b_real)/k rounded to SF fraction
//   bits. This is the coefficient procedure of the fixed-point PWL method.
// - pwl_eval() evaluates a LUT word exactly as the hardware formula defines it
//   (an independent integer model used as the bit-exact reference).
// - load_* tasks program every table of the SCS through the config port.
package scs_tb_pkg;
  import scs_pkg::*;

  localparam real PI = 3.14159265358979323846;

  // Format of each PWL function: IN_W, OUT_W, K_W, KF, S_W, SF (B_W = M1 = 7)
  typedef struct {
    int in_w; int out_w; int k_w; int kf; int s_w; int sf;
  } pwl_fmt_t;

  function automatic pwl_fmt_t fmt_of(cfg_target_e t);
    case (t)
      CFG_RECIP: return '{11, 16, 10, 2, 12, 4};
      CFG_ATAN:  return '{12, 12, 10, 7, 11, 3};
      CFG_SQRT:  return '{14, 16, 12, 6, 12, 2};
      CFG_ISQRT: return '{14, 16, 12, 6, 12, 2};
      CFG_ACOS:  return '{15, 13, 12, 6, 12, 2};
      CFG_SIN:   return '{13, 16, 11, 6, 14, 1};
      default:   return '{13, 10, 10, 10, 11, 3};  // CFG_FTAN
    endcase
  endfunction

  // Target functions on x in [0,1), result as a fraction of full scale.
  function automatic real func_of(cfg_target_e t, real x);
    case (t)
      CFG_RECIP: return 1.0 / (1.0 + x);
      CFG_ATAN:  return $atan(x) / (PI / 4.0);
      CFG_SQRT:  return $sqrt(x);
      CFG_ISQRT: return (x < 1.0 / 64.0) ? 4.0 : 1.0 / (2.0 * $sqrt(x));
      CFG_ACOS:  return $acos(x) / (PI / 2.0);
      CFG_SIN:   return $sin(x * PI / 2.0);
      default:   return 1.0 / (1.0 + $tan(x * PI / 2.0));
    endcase
  endfunction

  function automatic longint clampl(longint v, longint lo, longint hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  function automatic longint rnd(real v);
    return longint'($floor(v + 0.5));
  endfunction

  // One LUT word {b, k, S} for interval i.
  function automatic logic [31:0] pwl_fit(cfg_target_e t, int i);
    pwl_fmt_t f = fmt_of(t);
    int m2 = f.in_w - PWL_M1;
    int n2 = 1 << m2;
    int bsh = f.out_w - PWL_M1;
    real sx = 0, sy = 0, sxx = 0, sxy = 0, kr, br, bq, y;
    longint b, k, s;
    logic [31:0] w;
    for (int j = 0; j < n2; j++) begin
      y = func_of(t, real'(i * n2 + j) / real'(longint'(1) << f.in_w)) * real'(longint'(1) << f.out_w);
      sx += j; sy += y; sxx += real'(j) * j; sxy += real'(j) * y;
    end
    kr = (n2 * sxy - sx * sy) / (n2 * sxx - sx * sx);
    br = (sy - kr * sx) / n2;
    k  = clampl(rnd(kr * real'(longint'(1) << f.kf)), -(longint'(1) << (f.k_w - 1)), (longint'(1) << (f.k_w - 1)) - 1);
    if (k == 0) begin
      b = clampl(rnd(br / real'(1 << bsh)), 0, (1 << PWL_M1) - 1);
      s = 0;
    end else begin
      b  = clampl(longint'($floor(br / real'(1 << bsh))), 0, (1 << PWL_M1) - 1);
      bq = real'(b * (1 << bsh));
      s  = clampl(rnd((bq - br) / (real'(k) / real'(longint'(1) << f.kf)) * real'(1 << f.sf)),
                  -(longint'(1) << (f.s_w - 1)), (longint'(1) << (f.s_w - 1)) - 1);
    end
    w = '0;
    w = (32'(b) << (f.k_w + f.s_w)) | ((32'(k) & ((32'd1 << f.k_w) - 1)) << f.s_w)
      | (32'(s) & ((32'd1 << f.s_w) - 1));
    return w;
  endfunction

  function automatic longint sext(longint v, int w);
    return (v >= (longint'(1) << (w - 1))) ? v - (longint'(1) << w) : v;
  endfunction

  // Integer model of the hardware formula.
  function automatic longint pwl_eval(cfg_target_e t, logic [31:0] w, longint x);
    pwl_fmt_t f = fmt_of(t);
    int m2 = f.in_w - PWL_M1;
    int bsh = f.out_w - PWL_M1;
    longint b, k, s, x2, d, p, y;
    int sh = f.kf + f.sf;
    b  = (longint'(w) >> (f.k_w + f.s_w)) & ((1 << PWL_M1) - 1);
    k  = sext((longint'(w) >> f.s_w) & ((longint'(1) << f.k_w) - 1), f.k_w);
    s  = sext(longint'(w) & ((longint'(1) << f.s_w) - 1), f.s_w);
    x2 = x & ((1 << m2) - 1);
    d  = (x2 << f.sf) - s;
    p  = k * d;
    y  = (b << bsh) + ((p + (longint'(1) << (sh - 1))) >>> sh);
    return clampl(y, 0, (longint'(1) << f.out_w) - 1);
  endfunction

  // Value the function would ideally give, in output LSBs (saturated).
  function automatic real pwl_ideal(cfg_target_e t, longint x);
    pwl_fmt_t f = fmt_of(t);
    real y = func_of(t, real'(x) / real'(longint'(1) << f.in_w)) * real'(longint'(1) << f.out_w);
    real mx = real'((longint'(1) << f.out_w) - 1);
    return y > mx ? mx : (y < 0.0 ? 0.0 : y);
  endfunction


  // ---- supply levels and the programmable SCS constants ----
  // Four supply levels (full-scale amplitude of one PA = 1.0). 2*V4 exceeds
  // sqrt(2), the largest |I + jQ|, so every sample can be formed.
  localparam real VLEV [4] = '{0.18, 0.36, 0.54, 0.72};

  function automatic real sup_of(logic [1:0] code);
    return VLEV[code];
  endfunction

  // threshold k (0..6) in A^2 code units (value * 2^24)
  function automatic longint thresh(int k);
    real v;
    case (k)
      0: v = 2 * VLEV[0];           1: v = VLEV[0] + VLEV[1];
      2: v = 2 * VLEV[1];           3: v = VLEV[1] + VLEV[2];
      4: v = 2 * VLEV[2];           5: v = VLEV[2] + VLEV[3];
      default: v = 2 * VLEV[3];
    endcase
    return rnd(v * v * 16777216.0);
  endfunction

  // supply pair of region sel
  function automatic int sel_a1(int sel); return sel / 2; endfunction
  function automatic int sel_a2(int sel); return (sel + 1) / 2; endfunction

  // c1 / c2 for region sel and path p (0: alpha1, 1: alpha2), value * 2^14
  function automatic longint cconst(int which, int sel, int p);
    real ai = p == 0 ? VLEV[sel_a1(sel)] : VLEV[sel_a2(sel)];
    real aj = p == 0 ? VLEV[sel_a2(sel)] : VLEV[sel_a1(sel)];
    real c  = which == 1 ? 1.0 / (2.0 * ai) : (ai * ai - aj * aj) / (2.0 * ai);
    return rnd(c * 16384.0);
  endfunction

  // All configuration writes the SCS needs, one per index k.
  localparam int SCS_CFG_N = 6 * 128 + 7 + 14 + 14;

  function automatic cfg_wr_t scs_cfg_item(int k);
    cfg_wr_t c;
    cfg_target_e t [6] = '{CFG_RECIP, CFG_ATAN, CFG_SQRT, CFG_ISQRT, CFG_ACOS, CFG_FTAN};
    c.we = 1'b1;
    if (k < 768) begin
      c.sel = t[k / 128]; c.addr = 10'(k % 128); c.data = pwl_fit(t[k / 128], k % 128);
    end else if (k < 775) begin
      c.sel = CFG_THRESH; c.addr = 10'(k - 768); c.data = 32'(thresh(k - 768));
    end else if (k < 789) begin
      c.sel = CFG_C1; c.addr = 10'(k - 775); c.data = 32'(cconst(1, (k - 775) / 2, (k - 775) % 2));
    end else begin
      c.sel = CFG_C2; c.addr = 10'(k - 789); c.data = 32'(cconst(2, (k - 789) / 2, (k - 789) % 2));
    end
    return c;
  endfunction

  // Region index that the hardware rule gives for an exact A^2 code.
  function automatic int sel_ref(longint a2);
    int s = 0;
    for (int k = 0; k < 6; k++) if (a2 > thresh(k)) s = k + 1;
    return s;
  endfunction

  // Ideal arccos argument of path p for amplitude amp (real) in region sel.
  function automatic real acos_arg(real amp, int sel, int p);
    real ai = p == 0 ? VLEV[sel_a1(sel)] : VLEV[sel_a2(sel)];
    real aj = p == 0 ? VLEV[sel_a2(sel)] : VLEV[sel_a1(sel)];
    return (ai * ai + amp * amp - aj * aj) / (2.0 * amp * ai);
  endfunction

  // Circular difference of two 15-bit angles, in LSB, magnitude.
  function automatic real ang_err(real a, real b);
    real e = a - b;
    while (e > 16384.0) e -= 32768.0;
    while (e < -16384.0) e += 32768.0;
    return e < 0 ? -e : e;
  endfunction

endpackage
