// tb_get_phi: self-checking test of the outphasing-angle / f(phi) stage.
//
// Programs the 1/(1+tan) LUT, streams random (theta, alpha1, alpha2) one per
// clock and checks, four cycles later, quad1/quad2 exactly (the two MSBs of
// theta - alpha1 and theta + alpha2) and fphi1/fphi2 against
// 1/(1+tan(phi')) computed in real arithmetic (within 1.5 LSB of 10 bits).
`timescale 1ns/1ps
module tb_get_phi;
  import scs_pkg::*;
  import scs_tb_pkg::*;

  logic clk = 0;
  always #1 clk = ~clk;
  cfg_wr_t cfg;
  logic [14:0] theta, alpha1, alpha2;
  logic [9:0]  fphi1, fphi2;
  logic [1:0]  quad1, quad2;

  get_phi dut (.clk, .cfg, .theta, .alpha1, .alpha2, .fphi1, .fphi2, .quad1, .quad2);

  int checks = 0, failures = 0;
  localparam int N = 5000;
  localparam int LAT = 4;
  int tv [N], a1v [N], a2v [N];
  real maxerr = 0.0;

  function automatic real fref(int phi);
    real x = real'(phi % 8192) / 8192.0;
    real y = 1024.0 / (1.0 + $tan(x * PI / 2.0));
    return y > 1023.0 ? 1023.0 : y;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0; theta = '0; alpha1 = '0; alpha2 = '0;
    for (int i = 0; i < 128; i++) begin
      @(negedge clk); cfg.we = 1; cfg.sel = CFG_FTAN; cfg.addr = 10'(i); cfg.data = pwl_fit(CFG_FTAN, i);
    end
    @(negedge clk) cfg.we = 0;
    for (int n = 0; n < N; n++) begin
      tv[n] = $urandom_range(0, 32767); a1v[n] = $urandom_range(0, 16384); a2v[n] = $urandom_range(0, 16384);
    end
    for (int n = 0; n < N + LAT; n++) begin
      if (n < N) begin theta = 15'(tv[n]); alpha1 = 15'(a1v[n]); alpha2 = 15'(a2v[n]); end
      @(posedge clk); #0.1;
      if (n >= LAT - 1 && n - (LAT - 1) < N) begin
        automatic int m = n - (LAT - 1);
        automatic int p1 = (tv[m] - a1v[m] + 32768) % 32768;
        automatic int p2 = (tv[m] + a2v[m]) % 32768;
        automatic real e1 = real'(fphi1) - fref(p1), e2 = real'(fphi2) - fref(p2);
        if (e1 < 0) e1 = -e1;
        if (e2 < 0) e2 = -e2;
        if (e1 > maxerr) maxerr = e1;
        if (e2 > maxerr) maxerr = e2;
        checks += 4;
        if (quad1 != 2'(p1 / 8192)) failures++;
        if (quad2 != 2'(p2 / 8192)) failures++;
        if (e1 > 1.5) failures++;
        if (e2 > 1.5) failures++;
        if (failures > 0 && failures < 5)
          $display("m=%0d p1=%0d p2=%0d got q %0d %0d f %0d %0d", m, p1, p2, quad1, quad2, fphi1, fphi2);
      end
      @(negedge clk);
    end
    $display("max f(phi) error %f LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
