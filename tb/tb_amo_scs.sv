// tb_amo_scs: end-to-end test of the signal component separator.
//
// Programs all SCS tables (supply levels 0.18/0.36/0.54/0.72), streams random
// 13-bit (I,Q) samples one per clock with gaps in in_valid, and for each output:
//   - checks out_valid appears exactly 20 cycles after in_valid;
//   - checks a1, a2 exactly against the threshold rule on the exact A^2;
//   - rebuilds phi1, phi2 from (quad, fphi) and checks that
//     V[a1] exp(j phi1) + V[a2] exp(j phi2) lands within 0.015 of I + jQ
//     (the sum of two constant-envelope signals reproduces the sample).
// It also reports the rms vector error relative to the rms signal.
`timescale 1ns/1ps
module tb_amo_scs;
  import scs_pkg::*;
  import scs_tb_pkg::*;

  logic clk = 0;
  always #1 clk = ~clk;
  logic rst_n;
  cfg_wr_t cfg;
  logic in_valid, out_valid, over;
  logic [12:0] i_in, q_in;
  logic [9:0]  fphi1, fphi2;
  logic [1:0]  quad1, quad2, a1, a2;

  amo_scs dut (.clk, .rst_n, .cfg, .in_valid, .i_in, .q_in, .out_valid,
               .fphi1, .fphi2, .quad1, .quad2, .a1, .a2, .over);

  int checks = 0, failures = 0;
  localparam int LAT = 20;
  int sent = 0, got = 0;
  int qi [$], qq [$], qt [$];
  int cyc = 0;
  real err2 = 0.0, sig2 = 0.0, maxerr = 0.0;
  bit done = 0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // phase of one path from its quadrant and f = 1/(1+tan(phi'))
  function automatic real phase_of(logic [1:0] q, logic [9:0] f);
    real fr = (real'(f) + 0.5) / 1024.0;
    return real'(q) * PI / 2.0 + $atan(1.0 / fr - 1.0);
  endfunction

  function automatic int sext13(int v);
    return v >= 4096 ? v - 8192 : v;
  endfunction

  // output checker
  always @(posedge clk) begin
    #0.1;
    if (out_valid && rst_n) begin
      automatic int ii = qi.pop_front(), qv = qq.pop_front(), t0 = qt.pop_front();
      automatic int mi = ii < 0 ? -ii : ii, mq = qv < 0 ? -qv : qv;
      automatic longint a2e;
      automatic int s;
      automatic real ph1, ph2, ri, rq, e, xi, xq;
      if (mi > 4095) mi = 4095;
      if (mq > 4095) mq = 4095;
      a2e = longint'(mi) * mi + longint'(mq) * mq;
      s = sel_ref(a2e);
      got++;
      checks += 3;
      if (cyc - t0 != LAT) begin
        failures++; $display("latency %0d", cyc - t0);
      end
      if (a1 != 2'(sel_a1(s)) || a2 != 2'(sel_a2(s))) begin
        failures++; if (failures < 10) $display("supply I=%0d Q=%0d got %0d %0d sel %0d", ii, qv, a1, a2, s);
      end
      ph1 = phase_of(quad1, fphi1);
      ph2 = phase_of(quad2, fphi2);
      ri = sup_of(a1) * $cos(ph1) + sup_of(a2) * $cos(ph2);
      rq = sup_of(a1) * $sin(ph1) + sup_of(a2) * $sin(ph2);
      xi = real'(ii < 0 ? -mi : mi) / 4096.0;
      xq = real'(qv < 0 ? -mq : mq) / 4096.0;
      e = $sqrt((ri - xi) * (ri - xi) + (rq - xq) * (rq - xq));
      err2 += e * e; sig2 += xi * xi + xq * xq;
      if (e > maxerr) maxerr = e;
      if (e > 0.015) begin
        failures++;
        if (failures < 10) $display("vector I=%0d Q=%0d rebuilt %f %f err %f", ii, qv, ri * 4096, rq * 4096, e);
      end
    end
  end

  initial begin
    cfg = '0; in_valid = 0; i_in = '0; q_in = '0; rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < SCS_CFG_N; k++) begin
      @(negedge clk); cfg = scs_cfg_item(k);
    end
    @(negedge clk) cfg.we = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 9) != 0);
      i_in = 13'($urandom); q_in = 13'($urandom);
      if (n % 7 == 3) begin i_in = 13'($urandom_range(0, 300)); q_in = 13'(-$urandom_range(0, 300)); end
      if (in_valid) begin
        qi.push_back(sext13(int'(i_in))); qq.push_back(sext13(int'(q_in))); qt.push_back(cyc);
        sent++;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (LAT + 5) @(negedge clk);
    checks++;
    if (got != sent) begin failures++; $display("sent %0d got %0d", sent, got); end
    $display("samples %0d, rms error / rms signal = %f %%, max vector error %f", got,
             100.0 * $sqrt(err2 / sig2), maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
