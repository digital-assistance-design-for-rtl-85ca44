// tb_get_theta: self-checking test of the theta (atan2) pipeline.
//
// Programs the 1/x and arctan LUTs, then streams one sample per clock:
// random (I,Q), the axes, the diagonals, zero and full-scale values. Checks
// |I| and |Q| exactly one cycle after the input and theta eight cycles after
// the input against atan2() computed in real arithmetic (circular error of at
// most 3 LSB of the 15-bit angle).
`timescale 1ns/1ps
module tb_get_theta;
  import scs_pkg::*;
  import scs_tb_pkg::*;

  logic clk = 0;
  always #1 clk = ~clk;
  cfg_wr_t cfg;
  logic [12:0] i_in, q_in;
  logic [11:0] abs_i, abs_q;
  logic [14:0] theta;

  get_theta dut (.clk, .cfg, .i_in, .q_in, .abs_i, .abs_q, .theta);

  int checks = 0, failures = 0;
  localparam int N = 5000;
  logic [12:0] iv [N], qv [N];
  real maxerr = 0.0;

  function automatic int mag(logic [12:0] v);
    int a = v[12] ? -int'(signed'(v)) : int'(v);
    return a > 4095 ? 4095 : a;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0; i_in = '0; q_in = '0;
    for (int i = 0; i < 128; i++) begin
      @(negedge clk); cfg.we = 1; cfg.sel = CFG_RECIP; cfg.addr = 10'(i); cfg.data = pwl_fit(CFG_RECIP, i);
      @(negedge clk); cfg.we = 1; cfg.sel = CFG_ATAN;  cfg.addr = 10'(i); cfg.data = pwl_fit(CFG_ATAN, i);
    end
    @(negedge clk) cfg.we = 0;
    for (int n = 0; n < N; n++) begin
      iv[n] = 13'($urandom); qv[n] = 13'($urandom);
      case (n % 16)
        0: qv[n] = 0;
        1: iv[n] = 0;
        2: qv[n] = iv[n];
        3: qv[n] = 13'(-signed'(iv[n]));
        4: begin iv[n] = 13'h1000; qv[n] = 13'($urandom_range(0, 20)); end
        5: begin iv[n] = 13'($urandom_range(0, 7)); qv[n] = 13'(-$urandom_range(0, 7)); end
        default: ;
      endcase
      if (n == 7) begin iv[n] = 0; qv[n] = 0; end
    end
    for (int n = 0; n < N + 8; n++) begin
      if (n < N) begin i_in = iv[n]; q_in = qv[n]; end
      @(posedge clk); #0.1;
      // latency L: the sample applied before the posedge of iteration n
      // is visible after the posedge of iteration n + L - 1
      if (n < N) begin
        checks += 2;
        if (abs_i != 12'(mag(iv[n])) || abs_q != 12'(mag(qv[n]))) begin
          failures++;
          $display("mag n=%0d got %0d %0d", n, abs_i, abs_q);
        end
      end
      if (n >= 7 && n - 7 < N) begin
        automatic int m = n - 7;
        automatic real ii = iv[m][12] ? -real'(mag(iv[m])) : real'(mag(iv[m]));
        automatic real qq = qv[m][12] ? -real'(mag(qv[m])) : real'(mag(qv[m]));
        automatic real ang = (ii == 0.0 && qq == 0.0) ? 0.0 : $atan2(qq, ii);
        automatic real ex = ang * 32768.0 / (2.0 * PI);
        automatic real e;
        if (ex < 0) ex += 32768.0;
        e = real'(theta) - ex;
        if (e > 16384.0) e -= 32768.0;
        if (e < -16384.0) e += 32768.0;
        if (e < 0) e = -e;
        if (e > maxerr) maxerr = e;
        checks++;
        if (e > 3.0) begin
          failures++;
          if (failures < 10) $display("theta n=%0d I=%0d Q=%0d got %0d exp %f", m,
                                      signed'(iv[m]), signed'(qv[m]), theta, ex);
        end
      end
      @(negedge clk);
    end
    $display("max theta error %f LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
