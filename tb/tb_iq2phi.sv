// tb_iq2phi: self-checking test of the dI,dQ-to-phase-correction converter.
//
// Programs the quarter-wave sine and 1/(1+u) PWL tables and the per-supply
// factors g = 2^15/(2*pi*V) (V = 0.18/0.36/0.54/0.72). It then streams random
// phase pairs, supply codes and corrections one per clock, with gaps in
// in_valid. For each output, 9 cycles after its input, it checks:
//   - the result against the closed form
//       dphi1 = (dI cos phi2 + dQ sin phi2) / (V1 sin(phi2 - phi1))
//       dphi2 = (dI cos phi1 + dQ sin phi1) / (V2 sin(phi1 - phi2))
//     evaluated in real arithmetic, within a tolerance that grows as
//     1/|sin(phi2 - phi1)| (where the computation is ill-conditioned);
//   - for small corrections away from the singular case, that moving the two
//     phases by the outputs moves V1 e^{j phi1} + V2 e^{j phi2} by (dI, dQ),
//     which checks the sign convention independently of the formula;
//   - parallel phases (sin = 0) give sing = 1 and zero outputs, and a near-
//     singular case with a large correction saturates to +-(2^14 - 1);
//   - out_valid follows in_valid after exactly 9 cycles.
`timescale 1ns/1ps
module tb_iq2phi;
  import scs_pkg::*;
  import scs_tb_pkg::*;

  logic clk = 0;
  always #1 clk = ~clk;
  logic rst_n;
  cfg_wr_t cfg;
  logic in_valid, out_valid, sing;
  logic [14:0] phi1, phi2, dphi1, dphi2;
  logic [1:0]  a1, a2;
  logic [15:0] d_i, d_q;

  iq2phi dut (.clk, .rst_n, .cfg, .in_valid, .phi1, .phi2, .a1, .a2, .d_i, .d_q,
              .out_valid, .dphi1, .dphi2, .sing);

  localparam int LAT = 9;
  localparam int N   = 6000;
  localparam real U  = 32768.0 / (2.0 * PI);   // angle codes per radian

  typedef struct {
    int          cyc;
    logic [14:0] p1, p2;
    logic [1:0]  c1, c2;
    logic [15:0] di, dq;
  } item_t;
  item_t exp_q [$];

  int checks = 0, failures = 0, cyc = 0;
  int n_sing = 0, n_sat = 0, n_recon = 0;
  real maxrel = 0.0;

  function automatic real fabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  function automatic real ang(logic [14:0] a);
    return real'(a) * 2.0 * PI / 32768.0;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && in_valid)
      exp_q.push_back('{cyc + LAT, phi1, phi2, a1, a2, d_i, d_q});
    if (rst_n && out_valid) begin
      item_t e;
      real p1, p2, v1, v2, di, dq, sd, r1, r2, o1, o2, t1, t2, ei, eq;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected output at cycle %0d", cyc);
      end else begin
        e = exp_q.pop_front();
        if (e.cyc != cyc) begin
          failures++;
          $display("latency: expected output at %0d, got %0d", e.cyc, cyc);
        end
        p1 = ang(e.p1); p2 = ang(e.p2);
        v1 = VLEV[e.c1]; v2 = VLEV[e.c2];
        di = real'(signed'(e.di)) / 32768.0;
        dq = real'(signed'(e.dq)) / 32768.0;
        o1 = real'(signed'(dphi1));
        o2 = real'(signed'(dphi2));
        sd = $sin(p2 - p1);
        checks++;
        if (e.p1 == e.p2 || e.p2 == e.p1 + 15'h4000) begin
          n_sing++;
          if (!sing || dphi1 != 0 || dphi2 != 0) begin
            failures++;
            $display("singular case: sing=%0d dphi1=%f dphi2=%f", sing, o1, o2);
          end
        end else begin
          r1 = (di * $cos(p2) + dq * $sin(p2)) / (v1 * sd) * U;
          r2 = (di * $cos(p1) + dq * $sin(p1)) / (v2 * -sd) * U;
          if (sing) begin
            failures++;
            $display("sing raised for sin(phi2-phi1) = %f", sd);
          end
          // error budget: table error ~2e-4 of the numerator operands,
          // amplified by 1/(V |sd|), plus 0.3% of the result
          t1 = 2.0 + U * 3.0e-4 * (fabs(di) + fabs(dq) + 1.0e-3) / (v1 * fabs(sd)) + 0.003 * fabs(r1);
          t2 = 2.0 + U * 3.0e-4 * (fabs(di) + fabs(dq) + 1.0e-3) / (v2 * fabs(sd)) + 0.003 * fabs(r2);
          if (fabs(r1) > 16000.0 || fabs(r2) > 16000.0) begin
            // beyond the output range: must be saturated with the right sign
            if (fabs(r1) > 16500.0 || fabs(r2) > 16500.0) n_sat++;
            if ((fabs(r1) > 16500.0 && o1 != (r1 > 0 ? 16383.0 : -16383.0)) ||
                (fabs(r2) > 16500.0 && o2 != (r2 > 0 ? 16383.0 : -16383.0))) begin
              failures++;
              $display("saturation: ref %f %f got %f %f", r1, r2, o1, o2);
            end
          end else if (fabs(o1 - r1) > t1 || fabs(o2 - r2) > t2) begin
            failures++;
            $display("value: phi1=%0d phi2=%0d a=%0d,%0d d=(%f,%f) ref=(%f,%f) got=(%f,%f)",
                     e.p1, e.p2, e.c1, e.c2, di, dq, r1, r2, o1, o2);
          end else if (fabs(r1) > 50.0) begin
            if (fabs(o1 - r1) / fabs(r1) > maxrel) maxrel = fabs(o1 - r1) / fabs(r1);
          end
          // independent check of the sign convention: linearised movement
          if (fabs(sd) > 0.3 && fabs(r1) < 2000.0 && fabs(r2) < 2000.0) begin
            n_recon++;
            checks++;
            ei = -v1 * $sin(p1) * o1 / U - v2 * $sin(p2) * o2 / U;
            eq =  v1 * $cos(p1) * o1 / U + v2 * $cos(p2) * o2 / U;
            if (fabs(ei - di) > 2.0e-4 + 0.01 * (fabs(di) + fabs(dq)) ||
                fabs(eq - dq) > 2.0e-4 + 0.01 * (fabs(di) + fabs(dq))) begin
              failures++;
              $display("reconstruction: want (%f,%f) got (%f,%f)", di, dq, ei, eq);
            end
          end
        end
      end
    end
  end

  initial begin
    rst_n = 0; cfg = '0; in_valid = 0; phi1 = 0; phi2 = 0; a1 = 0; a2 = 0; d_i = 0; d_q = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 128; i++) begin
      @(negedge clk); cfg.we = 1; cfg.sel = CFG_RECIP; cfg.addr = 10'(i); cfg.data = pwl_fit(CFG_RECIP, i);
      @(negedge clk); cfg.we = 1; cfg.sel = CFG_SIN;   cfg.addr = 10'(i); cfg.data = pwl_fit(CFG_SIN, i);
    end
    for (int c = 0; c < 4; c++) begin
      @(negedge clk); cfg.we = 1; cfg.sel = CFG_INVA; cfg.addr = 10'(c);
      cfg.data = 32'(rnd(32768.0 / (2.0 * PI * VLEV[c]) * 64.0));
    end
    @(negedge clk) cfg.we = 0;
    for (int n = 0; n < N; n++) begin
      in_valid = ($urandom_range(0, 9) != 0);
      phi1 = 15'($urandom);
      phi2 = 15'($urandom);
      a1 = 2'($urandom); a2 = 2'($urandom);
      if (n % 3 == 0) begin
        d_i = 16'($urandom_range(0, 4000) - 2000);
        d_q = 16'($urandom_range(0, 4000) - 2000);
      end else begin
        d_i = 16'($urandom); d_q = 16'($urandom);
      end
      case (n % 50)
        5:  phi2 = phi1;                                   // parallel
        6:  phi2 = phi1 + 15'h4000;                        // anti-parallel
        7:  begin phi2 = phi1 + 15'd1; d_i = 16'h4000; d_q = 16'h3000; end  // near singular
        8:  phi2 = phi1 + 15'h2000;                        // 90 degrees apart
        9:  begin phi1 = 15'h0000; phi2 = 15'h6000; end    // axis values
        default: ;
      endcase
      @(negedge clk);
    end
    in_valid = 0;
    repeat (LAT + 4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d outputs missing", exp_q.size());
    end
    checks++;
    if (n_sing == 0 || n_sat == 0 || n_recon == 0) begin
      failures++;
      $display("coverage: singular %0d saturated %0d reconstructed %0d", n_sing, n_sat, n_recon);
    end
    $display("singular %0d saturated %0d reconstructed %0d, max relative error %f",
             n_sing, n_sat, n_recon, maxrel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
