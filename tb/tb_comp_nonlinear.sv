// tb_comp_nonlinear: self-checking test of the compensator's nonlinear
// transformation (two complex functions of phi, phi_d and the amplitudes).
//
// Part 1 loads random tables and amplitude coefficients and streams random
// phases and amplitudes with gaps in in_valid. Each output is compared
// bit-exactly with a model (grid cell from the top bits of phi and phi_d,
// planar piece, linear amplitude factor g, rounding and saturation). It must
// appear two edges after its input was taken (latency 3 cycles), and phi_d,
// a_d must be the previous *valid* sample's values.
// Part 2 checks the function without that model: it programs, for both
// modes, complex functions that are planar over the whole (phi, phi_d) range,
// so the planar pieces must reproduce them to within rounding, and compares
// the outputs with g(a, a_d) * P(phi, phi_d) in real arithmetic.
`timescale 1ns/1ps
module tb_comp_nonlinear;
  import scs_pkg::*;

  localparam int M = 3;
  localparam int D_W = 15 - M;
  localparam int NCELL = 1 << (2 * M);
  logic clk = 0;
  always #1 clk = ~clk;
  logic rst_n, in_valid, out_valid;
  cfg_wr_t cfg;
  logic [14:0] phi;
  logic [15:0] amp;
  logic signed [15:0] y_re [2], y_im [2];

  comp_nonlinear dut (.clk, .rst_n, .cfg, .in_valid, .phi, .amp, .out_valid, .y_re, .y_im);

  int checks = 0, failures = 0, cyc = 0, n_sat = 0, n_exact = 0;
  int tb_re [2][NCELL][3], tb_im [2][NCELL][3], gcf [2][3];
  int phd = 0, ampd = 0;      // model of the delayed values
  int exp_q [$];              // flattened: cycle, phi, phi_d, amp, amp_d
  bit part2 = 0;
  real maxerr = 0.0;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  function automatic int model(int md, bit im, int ph, int pd, int a, int ad);
    int cl = ((ph >> D_W) << M) | (pd >> D_W);
    int dx = ph & ((1 << D_W) - 1), dy = pd & ((1 << D_W) - 1);
    longint b, kx, ky, p, g, s;
    b  = im ? longint'(tb_im[md][cl][0]) : longint'(tb_re[md][cl][0]);
    kx = im ? longint'(tb_im[md][cl][1]) : longint'(tb_re[md][cl][1]);
    ky = im ? longint'(tb_im[md][cl][2]) : longint'(tb_re[md][cl][2]);
    s  = kx * dx + ky * dy + (1 <<< (D_W - 1));
    p  = sat16(b + (s >>> D_W));
    s  = longint'(gcf[md][1]) * a + longint'(gcf[md][2]) * ad + (1 <<< 14);
    g  = sat16(longint'(gcf[md][0]) + (s >>> 15));
    return int'(sat16((g * p + (1 <<< 13)) >>> 14));
  endfunction

  function automatic real fabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  // part 2 functions, u = phi / 2^15 and ud = phi_d / 2^15 in [0,1)
  function automatic real pref(int md, bit im, real u, real ud);
    if (md == 0) return im ? 0.3 - 0.25 * ud : 0.5 * u;
    else         return im ? 0.6 * u : 0.2 - 0.4 * ud;
  endfunction
  function automatic real gref(int md, real a, real ad);
    return md == 0 ? 0.5 + 0.8 * a - 0.3 * ad : 1.0 - 0.5 * a + 0.25 * ad;
  endfunction

  always @(posedge clk) begin
    #0.1;
    cyc++;
    if (rst_n && in_valid) begin
      exp_q.push_back(cyc + 2);
      exp_q.push_back(int'(phi)); exp_q.push_back(phd);
      exp_q.push_back(int'(amp)); exp_q.push_back(ampd);
      phd = int'(phi); ampd = int'(amp);
    end
    if (out_valid) begin
      checks++;
      if (exp_q.size() < 5) begin
        failures++; $display("unexpected output at %0d", cyc);
      end else begin
        automatic int t = exp_q.pop_front(), ph = exp_q.pop_front(), pd = exp_q.pop_front();
        automatic int a = exp_q.pop_front(), ad = exp_q.pop_front();
        if (t != cyc) begin
          failures++; $display("latency: output at %0d, expected %0d", cyc, t);
        end
        for (int md = 0; md < 2; md++) begin
          if (!part2) begin
            automatic int xr = model(md, 0, ph, pd, a, ad), xi = model(md, 1, ph, pd, a, ad);
            if (int'(y_re[md]) != xr || int'(y_im[md]) != xi) begin
              failures++;
              if (failures < 10)
                $display("mode %0d phi=%0d phi_d=%0d a=%0d a_d=%0d: got (%0d,%0d) want (%0d,%0d)",
                         md, ph, pd, a, ad, y_re[md], y_im[md], xr, xi);
            end
            if (y_re[md] == 16'sh7fff || y_re[md] == -16'sh8000) n_sat++;
          end else begin
            automatic real u = real'(ph) / 32768.0, ud = real'(pd) / 32768.0;
            automatic real g = gref(md, real'(a) / 32768.0, real'(ad) / 32768.0);
            automatic real er = real'(y_re[md]) / 16384.0 - g * pref(md, 0, u, ud);
            automatic real ei = real'(y_im[md]) / 16384.0 - g * pref(md, 1, u, ud);
            n_exact++;
            if (fabs(er) > maxerr) maxerr = fabs(er);
            if (fabs(ei) > maxerr) maxerr = fabs(ei);
            if (fabs(er) > 6.0 / 16384.0 || fabs(ei) > 6.0 / 16384.0) begin
              failures++;
              if (failures < 10)
                $display("function mode %0d u=%f ud=%f: error (%f,%f)", md, u, ud, er, ei);
            end
          end
        end
      end
    end
  end

  task automatic cfg_wr(int addr, logic [31:0] d);
    @(negedge clk); cfg.we = 1; cfg.sel = CFG_NL; cfg.addr = 10'(addr); cfg.data = d;
    @(negedge clk) cfg.we = 0;
  endtask

  task automatic load_tables();
    for (int md = 0; md < 2; md++) begin
      for (int c = 0; c < NCELL; c++)
        for (int pt = 0; pt < 3; pt++)
          cfg_wr((md << (2 * M + 2)) | (c << 2) | pt, {16'(tb_im[md][c][pt]), 16'(tb_re[md][c][pt])});
      for (int k = 0; k < 3; k++)
        cfg_wr((md << (2 * M + 2)) | (k << 2) | 3, 32'(gcf[md][k]));
    end
  endtask

  function automatic int q14(real v);
    return int'($rtoi(v * 16384.0 + (v >= 0.0 ? 0.5 : -0.5)));
  endfunction

  initial begin
    rst_n = 0; in_valid = 0; cfg = '0; phi = 0; amp = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // part 1: random tables
    for (int md = 0; md < 2; md++) begin
      for (int c = 0; c < NCELL; c++)
        for (int pt = 0; pt < 3; pt++) begin
          tb_re[md][c][pt] = $urandom_range(0, 40000) - 20000;
          tb_im[md][c][pt] = $urandom_range(0, 40000) - 20000;
        end
      for (int k = 0; k < 3; k++) gcf[md][k] = $urandom_range(0, 50000) - 25000;
    end
    load_tables();
    for (int n = 0; n < 4000; n++) begin
      in_valid = $urandom_range(0, 4) != 0;
      phi = 15'($urandom);
      amp = 16'($urandom);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (n_sat == 0) begin failures++; $display("saturation never reached"); end

    // part 2: planar functions, known amplitude factor
    for (int c = 0; c < NCELL; c++) begin
      automatic real ui = real'(c >> M) / real'(1 << M), uj = real'(c & ((1 << M) - 1)) / real'(1 << M);
      automatic real w = 1.0 / real'(1 << M);
      tb_re[0][c] = '{q14(0.5 * ui), q14(0.5 * w), 0};
      tb_im[0][c] = '{q14(0.3 - 0.25 * uj), 0, q14(-0.25 * w)};
      tb_re[1][c] = '{q14(0.2 - 0.4 * uj), 0, q14(-0.4 * w)};
      tb_im[1][c] = '{q14(0.6 * ui), q14(0.6 * w), 0};
    end
    gcf[0] = '{q14(0.5), q14(0.8), q14(-0.3)};
    gcf[1] = '{q14(1.0), q14(-0.5), q14(0.25)};
    load_tables();
    part2 = 1;
    for (int n = 0; n < 3000; n++) begin
      in_valid = $urandom_range(0, 3) != 0;
      phi = 15'($urandom);
      amp = 16'($urandom_range(0, 32768));
      @(negedge clk);
    end
    in_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d outputs missing", exp_q.size() / 5); end
    $display("saturated %0d, function checks %0d, max error %f", n_sat, n_exact, maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
