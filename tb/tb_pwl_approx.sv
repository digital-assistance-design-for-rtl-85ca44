// tb_pwl_approx: self-checking test of the fixed-point PWL unit.
//
// Six instances are built with the six function formats of the SCS
// (1/x, arctan, sqrt, 1/sqrt, arccos, 1/(1+tan)). Each LUT is filled with
// coefficients fitted in the testbench, then random inputs are streamed one per
// clock. Every output is compared with (a) an integer model of the PWL formula
// (bit exact), (b) the real-valued function, within a few output LSBs over the
// range the SCS uses, and (c) the 2-cycle latency.
`timescale 1ns/1ps
module tb_pwl_approx;
  import scs_pkg::*;
  import scs_tb_pkg::*;

  logic clk = 0;
  always #1 clk = ~clk;
  cfg_wr_t cfg;

  localparam int NF = 6;
  cfg_target_e tgt [NF] = '{CFG_RECIP, CFG_ATAN, CFG_SQRT, CFG_ISQRT, CFG_ACOS, CFG_FTAN};
  longint xin [NF];
  longint yout [NF];
  logic [10:0] x0; logic [15:0] y0;
  logic [11:0] x1; logic [11:0] y1;
  logic [13:0] x2; logic [15:0] y2;
  logic [13:0] x3; logic [15:0] y3;
  logic [14:0] x4; logic [12:0] y4;
  logic [12:0] x5; logic [9:0]  y5;

  pwl_approx #(.IN_W(11), .OUT_W(16), .K_W(10), .KF(2),  .S_W(12), .SF(4), .TARGET(CFG_RECIP)) u0 (.clk, .cfg, .x(x0), .y(y0));
  pwl_approx #(.IN_W(12), .OUT_W(12), .K_W(10), .KF(7),  .S_W(11), .SF(3), .TARGET(CFG_ATAN))  u1 (.clk, .cfg, .x(x1), .y(y1));
  pwl_approx #(.IN_W(14), .OUT_W(16), .K_W(12), .KF(6),  .S_W(12), .SF(2), .TARGET(CFG_SQRT))  u2 (.clk, .cfg, .x(x2), .y(y2));
  pwl_approx #(.IN_W(14), .OUT_W(16), .K_W(12), .KF(6),  .S_W(12), .SF(2), .TARGET(CFG_ISQRT)) u3 (.clk, .cfg, .x(x3), .y(y3));
  pwl_approx #(.IN_W(15), .OUT_W(13), .K_W(12), .KF(6),  .S_W(12), .SF(2), .TARGET(CFG_ACOS))  u4 (.clk, .cfg, .x(x4), .y(y4));
  pwl_approx #(.IN_W(13), .OUT_W(10), .K_W(10), .KF(10), .S_W(11), .SF(3), .TARGET(CFG_FTAN))  u5 (.clk, .cfg, .x(x5), .y(y5));

  assign x0 = 11'(xin[0]); assign x1 = 12'(xin[1]); assign x2 = 14'(xin[2]);
  assign x3 = 14'(xin[3]); assign x4 = 15'(xin[4]); assign x5 = 13'(xin[5]);
  assign yout = '{longint'(y0), longint'(y1), longint'(y2), longint'(y3), longint'(y4), longint'(y5)};

  int checks = 0, failures = 0;
  logic [31:0] luts [NF][128];
  longint hist [NF][3];     // inputs of the last cycles, [0] = current
  real maxerr [NF];

  // Domain in which the accuracy bound is checked, and the bound in LSBs.
  function automatic bit in_domain(int f, longint x);
    automatic pwl_fmt_t fm = fmt_of(tgt[f]);
    real xr = real'(x) / real'(longint'(1) << fm.in_w);
    case (f)
      2, 3:    return xr >= 0.25;
      4:       return xr <= 0.963;
      default: return 1'b1;
    endcase
  endfunction
  real tol [NF] = '{3.0, 1.0, 2.0, 5.0, 3.0, 1.0};

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0;
    foreach (xin[f]) xin[f] = 0;
    foreach (maxerr[f]) maxerr[f] = 0.0;
    // program the six LUTs
    for (int f = 0; f < NF; f++)
      for (int i = 0; i < 128; i++) begin
        luts[f][i] = pwl_fit(tgt[f], i);
        @(negedge clk);
        cfg.we = 1; cfg.sel = tgt[f]; cfg.addr = 10'(i); cfg.data = luts[f][i];
      end
    @(negedge clk) cfg.we = 0;
    // stream: at each negedge apply new x; check output of x applied 2 cycles ago
    for (int n = 0; n < 6000; n++) begin
      for (int f = 0; f < NF; f++) begin
        automatic pwl_fmt_t fm = fmt_of(tgt[f]);
        hist[f][2] = hist[f][1]; hist[f][1] = hist[f][0];
        hist[f][0] = (n < 64) ? longint'(n) * ((longint'(1) << fm.in_w) / 64)
                              : longint'($urandom) & ((longint'(1) << fm.in_w) - 1);
        if (n == 1) hist[f][0] = (longint'(1) << fm.in_w) - 1;
        xin[f] = hist[f][0];
      end
      @(posedge clk); #0.1;
      if (n >= 1) begin
        // after this posedge the outputs hold f(x applied at n-1): registered
        // at stage 1 on the previous posedge and stage 2 on this one
        for (int f = 0; f < NF; f++) begin
          automatic longint xm = hist[f][1];
          automatic longint exp_y = pwl_eval(tgt[f], luts[f][7'(xm >> (fmt_of(tgt[f]).in_w - PWL_M1))], xm);
          checks++;
          if (yout[f] != exp_y) begin
            failures++;
            if (failures < 10) $display("PWL %0d x=%0d got %0d exp %0d", f, xm, yout[f], exp_y);
          end
          if (in_domain(f, xm)) begin
            automatic real e = real'(yout[f]) - pwl_ideal(tgt[f], xm);
            if (e < 0) e = -e;
            if (e > maxerr[f]) maxerr[f] = e;
            checks++;
            if (e > tol[f]) begin
              failures++;
              if (failures < 10) $display("PWL %0d x=%0d err %f LSB", f, xm, e);
            end
          end
        end
      end
      @(negedge clk);
    end
    // latency: a step applied now must not be visible after one edge, but after two
    begin
      longint y_prev;
      xin[1] = 0; repeat (3) @(negedge clk);
      y_prev = yout[1];
      xin[1] = 4095;
      @(posedge clk); #0.1;
      checks++; if (yout[1] != y_prev) begin failures++; $display("latency < 2"); end
      @(posedge clk); #0.1;
      checks++; if (yout[1] == y_prev) begin failures++; $display("latency > 2"); end
    end
    for (int f = 0; f < NF; f++) $display("function %0d max error %f LSB", f, maxerr[f]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
