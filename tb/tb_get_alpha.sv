// tb_get_alpha: self-checking test of supply selection and alpha1/alpha2.
//
// Programs the sqrt, 1/sqrt and arccos LUTs, the thresholds and the c1/c2
// constants for supply levels 0.18/0.36/0.54/0.72, then streams random |I|,|Q|
// (plus zero, tiny and threshold-hugging amplitudes) one per clock. After the
// 15-cycle latency it checks a1, a2 and `over` exactly against the threshold
// rule evaluated on the exact A^2, and alpha1, alpha2 against arccos() of the
// law-of-cosines argument (within 8 LSB of the 15-bit angle when the argument
// magnitude is below 0.95, where the arccos approximation is specified).
`timescale 1ns/1ps
module tb_get_alpha;
  import scs_pkg::*;
  import scs_tb_pkg::*;

  logic clk = 0;
  always #1 clk = ~clk;
  cfg_wr_t cfg;
  logic [11:0] abs_i, abs_q;
  logic [14:0] alpha1, alpha2;
  logic [1:0]  a1, a2;
  logic        over;

  get_alpha dut (.clk, .cfg, .abs_i, .abs_q, .alpha1, .alpha2, .a1, .a2, .over);

  int checks = 0, failures = 0, acc_checked = 0;
  localparam int N = 6000;
  localparam int LAT = 15;
  int iv [N], qv [N];
  real maxerr = 0.0;
  int sel_seen [8];

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0; abs_i = '0; abs_q = '0;
    foreach (sel_seen[k]) sel_seen[k] = 0;
    for (int k = 0; k < SCS_CFG_N; k++) begin
      @(negedge clk); cfg = scs_cfg_item(k);
    end
    @(negedge clk) cfg.we = 0;
    for (int n = 0; n < N; n++) begin
      iv[n] = $urandom_range(0, 4095); qv[n] = $urandom_range(0, 4095);
      if (n % 10 == 1) begin iv[n] = $urandom_range(0, 3); qv[n] = $urandom_range(0, 3); end
      if (n % 10 == 2) begin  // on or next to a threshold
        automatic real r = $sqrt(real'(thresh($urandom_range(0, 6)))) + real'($urandom_range(0, 2)) - 1.0;
        iv[n] = int'(r); qv[n] = 0;
        if (iv[n] > 4095) iv[n] = 4095;
      end
    end
    iv[0] = 0; qv[0] = 0;
    for (int n = 0; n < N + LAT; n++) begin
      if (n < N) begin abs_i = 12'(iv[n]); abs_q = 12'(qv[n]); end
      @(posedge clk); #0.1;
      if (n >= LAT - 1 && n - (LAT - 1) < N) begin
        automatic int m = n - (LAT - 1);
        automatic longint a2e = longint'(iv[m]) * iv[m] + longint'(qv[m]) * qv[m];
        automatic int s = sel_ref(a2e);
        automatic real amp = $sqrt(real'(a2e)) / 4096.0;
        sel_seen[s]++;
        checks += 3;
        if (a1 != 2'(sel_a1(s)) || a2 != 2'(sel_a2(s)) || over != (a2e > thresh(6))) begin
          failures++;
          if (failures < 10) $display("sel m=%0d A2=%0d got %0d %0d exp sel %0d", m, a2e, a1, a2, s);
        end
        if (a2e > 0) begin
          automatic real x1 = acos_arg(amp, s, 0), x2 = acos_arg(amp, s, 1);
          automatic real e1, e2;
          if (x1 > -0.95 && x1 < 0.95) begin
            e1 = ang_err(real'(alpha1), $acos(x1) * 32768.0 / (2.0 * PI));
            checks++; acc_checked++;
            if (e1 > maxerr) maxerr = e1;
            if (e1 > 8.0) begin failures++; if (failures < 10) $display("alpha1 m=%0d got %0d x=%f err %f", m, alpha1, x1, e1); end
          end
          if (x2 > -0.95 && x2 < 0.95) begin
            e2 = ang_err(real'(alpha2), $acos(x2) * 32768.0 / (2.0 * PI));
            checks++; acc_checked++;
            if (e2 > maxerr) maxerr = e2;
            if (e2 > 8.0) begin failures++; if (failures < 10) $display("alpha2 m=%0d got %0d x=%f err %f", m, alpha2, x2, e2); end
          end
        end
      end
      @(negedge clk);
    end
    for (int k = 0; k < 7; k++) begin
      checks++;
      if (sel_seen[k] == 0) begin failures++; $display("supply pair %0d never selected", k); end
    end
    $display("alpha accuracy checks %0d, max error %f LSB", acc_checked, maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
