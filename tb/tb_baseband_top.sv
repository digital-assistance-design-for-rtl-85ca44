// tb_baseband_top: end-to-end test of the outphasing baseband.
//
// Programs every table of the design (predistorter, filter taps, the six PWL
// LUTs, thresholds and c1/c2 of both SCS copies) through the config port, then
// sends random 64-QAM symbols, first at oversampling 2 and then at
// oversampling 4. The testbench keeps its own model of the predistorter table
// (with a memory term that depends on the previous symbol) and of the
// polyphase filter, so it knows every even/odd sample the SCS copies receive.
// For each output pair it checks
//   - that it leaves 22 clock edges after its symbol was accepted (2 in the
//     filter, 20 in the SCS) for phases 0/1, one edge later for phases 2/3;
//   - the supply codes a1, a2 of both copies exactly;
//   - that V[a1] exp(j phi1) + V[a2] exp(j phi2) rebuilds the sample within
//     0.015.
// It counts the mechanisms of the design and fails if one never happened:
// oversampling-2 and -4 samples, symbol stalls (sym_ready low), symbols whose
// predistortion used the memory term, symbols from the on-chip PRBS source
// (tracked with its own PRBS-15 model), and each of the seven supply pairs.
//
// Alongside, the phase-correction converter (comp_* ports) receives random
// phase pairs, supply codes and small corrections. The test checks its 9-cycle
// latency and that moving the phases by its outputs moves the two-PA vector
// sum by (dI, dQ). It counts singular inputs (parallel phases: sing raised,
// zero outputs) and saturated outputs, and fails if either never occurred.
// The brickwall FIR (fir_* ports), the complex short FIR (sfir_* ports) and
// the compensator's nonlinear functions (nl_* ports) get random tables and
// random inputs. Each output is compared
// bit-exactly with a model, and each block must produce outputs.
`timescale 1ns/1ps
module tb_baseband_top;
  import scs_pkg::*;
  import scs_tb_pkg::*;

  localparam int NTAP = 8;
  logic clk = 0;
  always #1 clk = ~clk;
  logic rst_n, osr4, prbs_sel, sym_valid, sym_ready, out_valid;
  cfg_wr_t cfg;
  logic [2:0] sym_i, sym_q;
  scs_out_t scs_out [2];

  logic        comp_valid, comp_out_valid, comp_sing, comp_on = 0;
  logic [14:0] comp_phi1, comp_phi2, comp_dphi1, comp_dphi2;
  logic [1:0]  comp_a1, comp_a2;
  logic [15:0] comp_di, comp_dq;
  logic        fir_valid, fir_out_valid;
  logic [15:0] fir_x_even, fir_x_odd, fir_y;
  logic        sfir_valid, sfir_out_valid;
  logic [15:0] sfir_x_even_re, sfir_x_even_im, sfir_x_odd_re, sfir_x_odd_im;
  logic [15:0] sfir_y_even_re, sfir_y_even_im, sfir_y_odd_re, sfir_y_odd_im;
  logic        nl_valid, nl_out_valid;
  logic [14:0] nl_phi;
  logic [15:0] nl_amp;
  logic signed [15:0] nl_y_re [2], nl_y_im [2];

  baseband_top dut (.clk, .rst_n, .cfg, .osr4, .prbs_sel, .sym_valid, .sym_ready, .sym_i, .sym_q,
                    .out_valid, .scs_out,
                    .comp_valid, .comp_phi1, .comp_phi2, .comp_a1, .comp_a2,
                    .comp_di, .comp_dq, .comp_out_valid, .comp_dphi1, .comp_dphi2,
                    .comp_sing, .fir_valid, .fir_x_even, .fir_x_odd, .fir_out_valid,
                    .fir_y, .sfir_valid, .sfir_x_even_re, .sfir_x_even_im,
                    .sfir_x_odd_re, .sfir_x_odd_im, .sfir_out_valid, .sfir_y_even_re,
                    .sfir_y_even_im, .sfir_y_odd_re, .sfir_y_odd_im,
                    .nl_valid, .nl_phi, .nl_amp, .nl_out_valid, .nl_y_re, .nl_y_im);

  int checks = 0, failures = 0, cyc = 0;
  int c [4][NTAP];
  logic [23:0] tab [1024];
  int hi_hist [$], hq_hist [$];
  int exp_q [$];          // flattened: cycle, i0, q0, i1, q1
  int prev_i = 0, prev_q = 0;
  int n_osr2 = 0, n_osr4 = 0, n_stall = 0, n_mem = 0, n_out = 0;
  int pair_seen [7];
  real err2 = 0.0, sig2 = 0.0, maxerr = 0.0;

  always @(posedge clk) cyc <= cyc + 1;

  // ---- brickwall FIR: stimulus and bit-exact checker ----
  int fir_h [100];
  int fir_xs [$];
  int fir_q [$];          // flattened: cycle, value
  int n_fir = 0;

  always @(negedge clk) begin
    fir_valid  = comp_on && $urandom_range(0, 2) != 0;
    fir_x_even = 16'($urandom);
    fir_x_odd  = 16'($urandom);
  end

  always @(posedge clk) begin
    #0.1;
    if (rst_n && fir_valid) begin
      automatic longint acc = 1 <<< 16;
      fir_xs.push_back(int'(signed'(fir_x_even)));
      fir_xs.push_back(int'(signed'(fir_x_odd)));
      for (int k = 0; k < 100; k++)
        if (fir_xs.size() - 1 - k >= 0) acc += longint'(fir_h[k]) * fir_xs[fir_xs.size() - 1 - k];
      acc = acc >>> 17;
      if (acc > 32767) acc = 32767;
      if (acc < -32768) acc = -32768;
      fir_q.push_back(cyc + 1);
      fir_q.push_back(int'(acc));
    end
    if (rst_n && fir_out_valid) begin
      checks++;
      n_fir++;
      if (fir_q.size() < 2) begin
        failures++; $display("unexpected FIR output at %0d", cyc);
      end else begin
        automatic int t = fir_q.pop_front(), v = fir_q.pop_front();
        if (t != cyc || int'(signed'(fir_y)) != v) begin
          failures++; $display("FIR at %0d (expected %0d): %0d want %0d", cyc, t, signed'(fir_y), v);
        end
      end
    end
  end

  // ---- complex short FIR: stimulus and bit-exact checker ----
  int sfir_hr [8], sfir_hi [8];
  int sfir_xr [$], sfir_xi [$];
  int sfir_q [$];         // flattened: cycle, even re, even im, odd re, odd im
  int n_sfir = 0;

  always @(negedge clk) begin
    sfir_valid     = comp_on && $urandom_range(0, 2) != 0;
    sfir_x_even_re = 16'($urandom); sfir_x_even_im = 16'($urandom);
    sfir_x_odd_re  = 16'($urandom); sfir_x_odd_im  = 16'($urandom);
  end

  function automatic int sfir_out(int j, bit im);
    longint acc = 1 <<< 15;
    for (int k = 0; k < 8; k++)
      if (j - k >= 0)
        acc += im ? longint'(sfir_hr[k]) * sfir_xi[j-k] + longint'(sfir_hi[k]) * sfir_xr[j-k]
                  : longint'(sfir_hr[k]) * sfir_xr[j-k] - longint'(sfir_hi[k]) * sfir_xi[j-k];
    acc = acc >>> 16;
    if (acc > 32767) acc = 32767;
    if (acc < -32768) acc = -32768;
    return int'(acc);
  endfunction

  always @(posedge clk) begin
    #0.1;
    if (rst_n && sfir_valid) begin
      automatic int j;
      sfir_xr.push_back(int'(signed'(sfir_x_even_re))); sfir_xi.push_back(int'(signed'(sfir_x_even_im)));
      sfir_xr.push_back(int'(signed'(sfir_x_odd_re)));  sfir_xi.push_back(int'(signed'(sfir_x_odd_im)));
      j = sfir_xr.size() - 1;
      sfir_q.push_back(cyc + 1);
      sfir_q.push_back(sfir_out(j - 1, 0)); sfir_q.push_back(sfir_out(j - 1, 1));
      sfir_q.push_back(sfir_out(j, 0));     sfir_q.push_back(sfir_out(j, 1));
    end
    if (rst_n && sfir_out_valid) begin
      checks++;
      n_sfir++;
      if (sfir_q.size() < 5) begin
        failures++; $display("unexpected short-FIR output at %0d", cyc);
      end else begin
        automatic int t = sfir_q.pop_front();
        automatic int er = sfir_q.pop_front(), ei = sfir_q.pop_front();
        automatic int orr = sfir_q.pop_front(), oi = sfir_q.pop_front();
        if (t != cyc || int'(signed'(sfir_y_even_re)) != er || int'(signed'(sfir_y_even_im)) != ei ||
            int'(signed'(sfir_y_odd_re)) != orr || int'(signed'(sfir_y_odd_im)) != oi) begin
          failures++;
          $display("short FIR at %0d (expected %0d): (%0d,%0d) (%0d,%0d) want (%0d,%0d) (%0d,%0d)",
                   cyc, t, signed'(sfir_y_even_re), signed'(sfir_y_even_im),
                   signed'(sfir_y_odd_re), signed'(sfir_y_odd_im), er, ei, orr, oi);
        end
      end
    end
  end

  // ---- nonlinear functions: stimulus and bit-exact checker ----
  // 8 x 8 grid: cell = {phi[14:12], phi_d[14:12]}, offsets are the low 12 bits
  int nl_tab [2][64][3];      // {imag, real} words
  int nl_g [2][3];
  int nl_phd = 0, nl_ampd = 0;
  int nl_q [$];               // flattened: cycle, phi, phi_d, amp, amp_d
  int n_nl = 0;

  always @(negedge clk) begin
    nl_valid = comp_on && $urandom_range(0, 2) != 0;
    nl_phi   = 15'($urandom);
    nl_amp   = 16'($urandom);
  end

  function automatic longint nl_sat(longint v);
    return v > 32767 ? 32767 : v < -32768 ? -32768 : v;
  endfunction

  function automatic int nl_model(int md, bit im, int ph, int pd, int a, int ad);
    int cl = ((ph >> 12) << 3) | (pd >> 12);
    longint b, kx, ky, p, g, s;
    b  = longint'(signed'(16'(nl_tab[md][cl][0] >> (im ? 16 : 0))));
    kx = longint'(signed'(16'(nl_tab[md][cl][1] >> (im ? 16 : 0))));
    ky = longint'(signed'(16'(nl_tab[md][cl][2] >> (im ? 16 : 0))));
    s  = kx * (longint'(ph) & 4095) + ky * (longint'(pd) & 4095) + 2048;
    p  = nl_sat(b + (s >>> 12));
    s  = longint'(nl_g[md][1]) * a + longint'(nl_g[md][2]) * ad + 16384;
    g  = nl_sat(longint'(nl_g[md][0]) + (s >>> 15));
    return int'(nl_sat((g * p + 8192) >>> 14));
  endfunction

  always @(posedge clk) begin
    #0.1;
    if (rst_n && nl_valid) begin
      nl_q.push_back(cyc + 2);
      nl_q.push_back(int'(nl_phi)); nl_q.push_back(nl_phd);
      nl_q.push_back(int'(nl_amp)); nl_q.push_back(nl_ampd);
      nl_phd = int'(nl_phi); nl_ampd = int'(nl_amp);
    end
    if (rst_n && nl_out_valid) begin
      checks++;
      n_nl++;
      if (nl_q.size() < 5) begin
        failures++; $display("unexpected nonlinear output at %0d", cyc);
      end else begin
        automatic int t = nl_q.pop_front(), ph = nl_q.pop_front(), pd = nl_q.pop_front();
        automatic int a = nl_q.pop_front(), ad = nl_q.pop_front();
        if (t != cyc) begin failures++; $display("nonlinear output at %0d, expected %0d", cyc, t); end
        for (int md = 0; md < 2; md++)
          if (int'(nl_y_re[md]) != nl_model(md, 0, ph, pd, a, ad) ||
              int'(nl_y_im[md]) != nl_model(md, 1, ph, pd, a, ad)) begin
            failures++;
            $display("nonlinear mode %0d at %0d: got (%0d,%0d) want (%0d,%0d)", md, cyc,
                     nl_y_re[md], nl_y_im[md], nl_model(md, 0, ph, pd, a, ad), nl_model(md, 1, ph, pd, a, ad));
          end
      end
    end
  end

  // ---- phase-correction converter: stimulus and checker ----
  int comp_q [$];         // flattened: cycle, phi1, phi2, a1, a2, di, dq
  int n_comp = 0, n_sing = 0, n_sat = 0;

  always @(negedge clk) begin
    comp_valid = comp_on && $urandom_range(0, 3) != 0;
    comp_phi1  = 15'($urandom);
    comp_phi2  = 15'($urandom);
    comp_a1    = 2'($urandom);
    comp_a2    = 2'($urandom);
    comp_di    = 16'($urandom_range(0, 2000) - 1000);
    comp_dq    = 16'($urandom_range(0, 2000) - 1000);
    case ($urandom_range(0, 39))
      0: comp_phi2 = comp_phi1;
      1: begin comp_phi2 = comp_phi1 + 15'd2; comp_di = 16'h2000; end
      default: ;
    endcase
  end

  always @(posedge clk) begin
    #0.1;
    if (rst_n && comp_valid) begin
      comp_q.push_back(cyc + 8);   // captured at this edge, result registered 8 edges later
      comp_q.push_back(int'(comp_phi1)); comp_q.push_back(int'(comp_phi2));
      comp_q.push_back(int'(comp_a1));   comp_q.push_back(int'(comp_a2));
      comp_q.push_back(int'(signed'(comp_di))); comp_q.push_back(int'(signed'(comp_dq)));
      end
    if (rst_n && comp_out_valid) begin
      checks++;
      n_comp++;
      if (comp_q.size() < 7) begin
        failures++; $display("unexpected converter output at %0d", cyc);
      end else begin
        automatic int t = comp_q.pop_front();
        automatic real p1 = real'(comp_q.pop_front()) * 2.0 * PI / 32768.0;
        automatic real p2 = real'(comp_q.pop_front()) * 2.0 * PI / 32768.0;
        automatic real v1 = VLEV[comp_q.pop_front()];
        automatic real v2 = VLEV[comp_q.pop_front()];
        automatic real di = real'(comp_q.pop_front()) / 32768.0;
        automatic real dq = real'(comp_q.pop_front()) / 32768.0;
        automatic real o1 = real'(signed'(comp_dphi1)) * 2.0 * PI / 32768.0;
        automatic real o2 = real'(signed'(comp_dphi2)) * 2.0 * PI / 32768.0;
        automatic real sd = $sin(p2 - p1);
        automatic real ei = -v1 * $sin(p1) * o1 - v2 * $sin(p2) * o2;
        automatic real eq =  v1 * $cos(p1) * o1 + v2 * $cos(p2) * o2;
        if (t != cyc) begin
          failures++; $display("converter output at %0d expected at %0d", cyc, t);
        end
        if (comp_sing) n_sing++;
        if (comp_dphi1 == 15'h3fff || comp_dphi1 == 15'h4001) n_sat++;
        if (p1 == p2) begin
          checks++;
          if (!comp_sing || comp_dphi1 != 0 || comp_dphi2 != 0) begin
            failures++; $display("converter: parallel phases not flagged");
          end
        end else if (sd > 0.3 || sd < -0.3) begin
          checks++;
          if (ei - di > 3.0e-4 || di - ei > 3.0e-4 || eq - dq > 3.0e-4 || dq - eq > 3.0e-4) begin
            failures++;
            $display("converter: want (%f,%f) got (%f,%f)", di, dq, ei, eq);
          end
        end
      end
    end
  end

  // predistorter contents: symbol level (2l-7)/7 * 0.95, plus a memory term of
  // 8 LSB per previous-symbol MSB pair
  function automatic logic [23:0] pd_entry(int a);
    int li = (a >> 3) & 7, lq = a & 7, pi2 = (a >> 8) & 3, pq2 = (a >> 6) & 3;
    int vi = int'(rnd(real'(2 * li - 7) / 7.0 * 0.95 * 2048.0)) + 8 * pi2;
    int vq = int'(rnd(real'(2 * lq - 7) / 7.0 * 0.95 * 2048.0)) - 8 * pq2;
    return {12'(vi), 12'(vq)};
  endfunction

  // Hann-windowed sinc interpolator of oversampling osr, tap index k
  function automatic real hsinc(int k, int osr);
    real t = real'(k - (NTAP / 2) * osr) / real'(osr);
    real w = 0.5 - 0.5 * $cos(2.0 * PI * real'(k) / real'(NTAP * osr));
    return (t == 0.0 ? 1.0 : $sin(PI * t) / (PI * t)) * w;
  endfunction

  function automatic int fir(ref int h [$], input int ph);
    longint acc = 1 <<< 10;
    for (int t = 0; t < NTAP; t++)
      if (h.size() - 1 - t >= 0) acc += longint'(c[ph][t]) * h[h.size() - 1 - t];
    acc = acc >>> 11;
    if (acc > 4095) acc = 4095;
    if (acc < -4096) acc = -4096;
    return int'(acc);
  endfunction

  function automatic real phase_of(logic [1:0] q, logic [9:0] f);
    real fr = (real'(f) + 0.5) / 1024.0;
    return real'(q) * PI / 2.0 + $atan(1.0 / fr - 1.0);
  endfunction

  task automatic cfg_wr(cfg_target_e s, int a, logic [31:0] d);
    @(negedge clk); cfg.we = 1; cfg.sel = s; cfg.addr = 10'(a); cfg.data = d;
  endtask

  task automatic load_filter(int osr);
    for (int p = 0; p < 4; p++)
      for (int t = 0; t < NTAP; t++) begin
        c[p][t] = (p < osr) ? int'(rnd(hsinc(t * osr + p, osr) * 4096.0)) : 0;
        cfg_wr(CFG_COEF, p * NTAP + t, 32'(c[p][t]));
      end
    @(negedge clk) cfg.we = 0;
  endtask

  // PRBS-15 model (x^15 + x^14 + 1, seed all ones, six steps per symbol)
  logic [14:0] prbs_m = 15'h7fff;
  int n_prbs = 0;

  // symbol accept monitor: model predistorter and filter
  always @(posedge clk) begin
    automatic logic v = prbs_sel ? 1'b1 : sym_valid;
    automatic int   xi = prbs_sel ? int'(prbs_m[5:3]) : int'(sym_i);
    automatic int   xq = prbs_sel ? int'(prbs_m[2:0]) : int'(sym_q);
    if (!rst_n) prbs_m = 15'h7fff;
    if (rst_n && v && !sym_ready) n_stall++;
    if (rst_n && v && sym_ready) begin
      automatic int a = (prev_i >> 1) * 256 + (prev_q >> 1) * 64 + xi * 8 + xq;
      automatic logic [23:0] e = tab[a];
      if (a >= 64) n_mem++;
      prev_i = xi; prev_q = xq;
      if (prbs_sel) begin
        n_prbs++;
        for (int k = 0; k < 6; k++) prbs_m = {prbs_m[13:0], prbs_m[14] ^ prbs_m[13]};
      end
      hi_hist.push_back(int'(signed'(e[23:12])));
      hq_hist.push_back(int'(signed'(e[11:0])));
      exp_q.push_back(cyc + 22);
      exp_q.push_back(fir(hi_hist, 0)); exp_q.push_back(fir(hq_hist, 0));
      exp_q.push_back(fir(hi_hist, 1)); exp_q.push_back(fir(hq_hist, 1));
      if (osr4) begin
        exp_q.push_back(cyc + 23);
        exp_q.push_back(fir(hi_hist, 2)); exp_q.push_back(fir(hq_hist, 2));
        exp_q.push_back(fir(hi_hist, 3)); exp_q.push_back(fir(hq_hist, 3));
      end
    end
  end

  task automatic check_copy(int k, int si, int sq);
    automatic int mi = si < 0 ? -si : si, mq = sq < 0 ? -sq : sq;
    automatic longint a2e;
    automatic int s;
    automatic real ph1, ph2, ri, rq, xi, xq, e;
    if (mi > 4095) mi = 4095;
    if (mq > 4095) mq = 4095;
    a2e = longint'(mi) * mi + longint'(mq) * mq;
    s = sel_ref(a2e);
    pair_seen[s]++;
    checks += 2;
    if (scs_out[k].a1 != 2'(sel_a1(s)) || scs_out[k].a2 != 2'(sel_a2(s))) begin
      failures++;
      if (failures < 10) $display("copy %0d supply got %0d %0d exp sel %0d", k, scs_out[k].a1, scs_out[k].a2, s);
    end
    ph1 = phase_of(scs_out[k].quad1, scs_out[k].fphi1);
    ph2 = phase_of(scs_out[k].quad2, scs_out[k].fphi2);
    ri = sup_of(scs_out[k].a1) * $cos(ph1) + sup_of(scs_out[k].a2) * $cos(ph2);
    rq = sup_of(scs_out[k].a1) * $sin(ph1) + sup_of(scs_out[k].a2) * $sin(ph2);
    xi = real'(si < 0 ? -mi : mi) / 4096.0;
    xq = real'(sq < 0 ? -mq : mq) / 4096.0;
    e = $sqrt((ri - xi) * (ri - xi) + (rq - xq) * (rq - xq));
    err2 += e * e; sig2 += xi * xi + xq * xq;
    if (e > maxerr) maxerr = e;
    if (e > 0.015) begin
      failures++;
      if (failures < 10) $display("copy %0d sample %0d %0d error %f", k, si, sq, e);
    end
  endtask

  // output checker
  always @(posedge clk) begin
    #0.1;
    if (rst_n && out_valid) begin
      checks++;
      n_out++;
      if (osr4) n_osr4++; else n_osr2++;
      if (exp_q.size() < 5) begin
        failures++; $display("unexpected output at %0d", cyc);
      end else begin
        automatic int t = exp_q.pop_front(), i0 = exp_q.pop_front(), q0 = exp_q.pop_front();
        automatic int i1 = exp_q.pop_front(), q1 = exp_q.pop_front();
        if (t != cyc) begin
          failures++; if (failures < 10) $display("output at %0d expected at %0d", cyc, t);
        end
        check_copy(0, i0, q0);
        check_copy(1, i1, q1);
      end
    end
  end

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(int n);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      if (!sym_valid || sym_ready || $urandom_range(0, 1) == 0) begin
        // new symbol (sometimes withdrawn: valid may drop)
        sym_valid = $urandom_range(0, 7) != 0;
        sym_i = 3'($urandom); sym_q = 3'($urandom);
      end
    end
    @(negedge clk) sym_valid = 0;
    repeat (30) @(negedge clk);
  endtask

  initial begin
    rst_n = 0; osr4 = 0; prbs_sel = 0; sym_valid = 0; sym_i = 0; sym_q = 0; cfg = '0;
    foreach (pair_seen[k]) pair_seen[k] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < SCS_CFG_N; k++) begin
      @(negedge clk); cfg = scs_cfg_item(k);
    end
    for (int i = 0; i < 128; i++) cfg_wr(CFG_SIN, i, pwl_fit(CFG_SIN, i));
    for (int a = 0; a < 4; a++)
      cfg_wr(CFG_INVA, a, 32'(rnd(32768.0 / (2.0 * PI * VLEV[a]) * 64.0)));
    for (int k = 0; k < 100; k++) begin
      fir_h[k] = $urandom_range(0, 4000) - 2000;
      cfg_wr(CFG_FIR, k, 32'(fir_h[k]));
    end
    for (int k = 0; k < 8; k++) begin
      sfir_hr[k] = $urandom_range(0, 40000) - 20000;
      sfir_hi[k] = $urandom_range(0, 40000) - 20000;
      cfg_wr(CFG_SFIR, 2 * k, 32'(sfir_hr[k]));
      cfg_wr(CFG_SFIR, 2 * k + 1, 32'(sfir_hi[k]));
    end
    for (int md = 0; md < 2; md++) begin
      for (int cl = 0; cl < 64; cl++)
        for (int pt = 0; pt < 3; pt++) begin
          nl_tab[md][cl][pt] = int'($urandom);
          cfg_wr(CFG_NL, (md << 8) | (cl << 2) | pt, 32'(nl_tab[md][cl][pt]));
        end
      for (int k = 0; k < 3; k++) begin
        nl_g[md][k] = $urandom_range(0, 40000) - 20000;
        cfg_wr(CFG_NL, (md << 8) | (k << 2) | 3, 32'(nl_g[md][k]));
      end
    end
    comp_on = 1;
    for (int a = 0; a < 1024; a++) begin
      tab[a] = pd_entry(a);
      cfg_wr(CFG_PREDIST, a, 32'(tab[a]));
    end
    load_filter(2);
    send(1500);
    // mode switch: new taps, oversampling 4
    osr4 = 1;
    load_filter(4);
    send(1500);
    // on-chip PRBS source (external symbols ignored), still at oversampling 4
    prbs_sel = 1;
    send(600);
    prbs_sel = 0;
    repeat (30) @(negedge clk);
    comp_on = 0;
    repeat (12) @(negedge clk);
    checks++; if (comp_q.size() != 0) begin failures++; $display("converter outputs missing"); end
    checks += 3;
    if (n_comp == 0) begin failures++; $display("converter never produced output"); end
    checks += 2;
    if (n_fir == 0) begin failures++; $display("FIR never produced output"); end
    if (fir_q.size() != 0) begin failures++; $display("FIR outputs missing"); end
    $display("FIR outputs %0d", n_fir);
    checks += 2;
    if (n_sfir == 0) begin failures++; $display("short FIR never produced output"); end
    if (sfir_q.size() != 0) begin failures++; $display("short-FIR outputs missing"); end
    $display("short-FIR outputs %0d", n_sfir);
    checks += 2;
    if (n_nl == 0) begin failures++; $display("nonlinear functions never produced output"); end
    if (nl_q.size() != 0) begin failures++; $display("nonlinear outputs missing"); end
    $display("nonlinear outputs %0d", n_nl);
    if (n_sing == 0) begin failures++; $display("converter singular case never seen"); end
    if (n_sat == 0) begin failures++; $display("converter saturation never seen"); end
    $display("converter outputs %0d, singular %0d, saturated %0d", n_comp, n_sing, n_sat);
    checks++; if (exp_q.size() != 0) begin failures++; $display("%0d outputs missing", exp_q.size() / 5); end
    $display("outputs %0d (osr2 %0d, osr4 %0d), stalls %0d, memory-term symbols %0d",
             n_out, n_osr2, n_osr4, n_stall, n_mem);
    for (int k = 0; k < 7; k++) $display("supply pair %0d selected %0d times", k, pair_seen[k]);
    checks += 4;
    if (n_osr2 == 0) begin failures++; $display("no oversampling-2 output"); end
    if (n_osr4 == 0) begin failures++; $display("no oversampling-4 output"); end
    if (n_stall == 0) begin failures++; $display("no stall"); end
    if (n_mem == 0) begin failures++; $display("memory term never used"); end
    checks++;
    if (n_prbs == 0) begin failures++; $display("PRBS source never used"); end
    $display("PRBS symbols %0d", n_prbs);
    for (int k = 0; k < 7; k++) begin
      checks++;
      if (pair_seen[k] == 0) begin failures++; $display("supply pair %0d never selected", k); end
    end
    $display("rms vector error / rms signal = %f %%, max %f", 100.0 * $sqrt(err2 / sig2), maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
