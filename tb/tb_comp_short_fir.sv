// tb_comp_short_fir: self-checking test of the complex short-tap FIR on
// two-way interleaved samples.
//
// Part 1 loads random complex taps and streams random complex sample pairs
// with gaps in in_valid. Both outputs of each pair are compared bit-exactly
// with a model of y[j] = sum_k h[k] x[j-k] (complex, rounded, saturated) and
// must appear exactly one edge after the pair was taken (latency 2 cycles).
// Full-scale inputs drive the outputs into saturation at least once.
// Part 2 checks the complex arithmetic without that model: a real impulse
// must return the taps (y[k] = h[k] * x0), and an imaginary impulse j*x0
// must return j*h[k] (re = -hi, im = hr), on both interleaving phases.
`timescale 1ns/1ps
module tb_comp_short_fir;
  import scs_pkg::*;

  localparam int NTAPS = 8;
  logic clk = 0;
  always #1 clk = ~clk;
  logic rst_n, in_valid, out_valid;
  cfg_wr_t cfg;
  logic signed [15:0] x_even_re, x_even_im, x_odd_re, x_odd_im;
  logic signed [15:0] y_even_re, y_even_im, y_odd_re, y_odd_im;

  comp_short_fir dut (.clk, .rst_n, .cfg, .in_valid,
                      .x_even_re, .x_even_im, .x_odd_re, .x_odd_im,
                      .out_valid, .y_even_re, .y_even_im, .y_odd_re, .y_odd_im);

  int checks = 0, failures = 0, cyc = 0, n_sat = 0, n_imp = 0;
  int hr [NTAPS], hi [NTAPS];
  int xr [$], xi [$];       // full-rate input history
  int exp_q [$];            // flattened: cycle, even re, even im, odd re, odd im
  int outs [$];             // flattened outputs, for part 2

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clip(longint acc);
    acc = (acc + (1 <<< 15)) >>> 16;
    if (acc > 32767) acc = 32767;
    if (acc < -32768) acc = -32768;
    return int'(acc);
  endfunction

  // output at full-rate index j (the newest sample has index xr.size()-1)
  task automatic model(int j, output int yr, output int yi);
    longint ar = 0, ai = 0;
    for (int k = 0; k < NTAPS; k++)
      if (j - k >= 0) begin
        ar += longint'(hr[k]) * xr[j-k] - longint'(hi[k]) * xi[j-k];
        ai += longint'(hr[k]) * xi[j-k] + longint'(hi[k]) * xr[j-k];
      end
    yr = clip(ar);
    yi = clip(ai);
  endtask

  always @(posedge clk) begin
    #0.1;
    cyc++;
    if (rst_n && in_valid) begin
      automatic int er, ei, orr, oi;
      xr.push_back(int'(x_even_re)); xi.push_back(int'(x_even_im));
      xr.push_back(int'(x_odd_re));  xi.push_back(int'(x_odd_im));
      model(xr.size() - 2, er, ei);
      model(xr.size() - 1, orr, oi);
      exp_q.push_back(cyc + 1);
      exp_q.push_back(er); exp_q.push_back(ei); exp_q.push_back(orr); exp_q.push_back(oi);
    end
    if (out_valid) begin
      automatic int t, er, ei, orr, oi;
      checks++;
      outs.push_back(int'(y_even_re)); outs.push_back(int'(y_even_im));
      outs.push_back(int'(y_odd_re));  outs.push_back(int'(y_odd_im));
      if (exp_q.size() < 5) begin
        failures++; $display("unexpected output at %0d", cyc);
      end else begin
        t = exp_q.pop_front();
        er = exp_q.pop_front(); ei = exp_q.pop_front();
        orr = exp_q.pop_front(); oi = exp_q.pop_front();
        if (t != cyc || int'(y_even_re) != er || int'(y_even_im) != ei ||
            int'(y_odd_re) != orr || int'(y_odd_im) != oi) begin
          failures++;
          if (failures < 10)
            $display("cycle %0d (expected %0d): got (%0d,%0d) (%0d,%0d) want (%0d,%0d) (%0d,%0d)",
                     cyc, t, y_even_re, y_even_im, y_odd_re, y_odd_im, er, ei, orr, oi);
        end
        if (y_odd_re == 16'sh7fff || y_odd_re == -16'sh8000) n_sat++;
      end
    end
  end

  task automatic load();
    for (int k = 0; k < NTAPS; k++) begin
      hr[k] = $urandom_range(0, 100000) - 50000;
      hi[k] = $urandom_range(0, 100000) - 50000;
      @(negedge clk); cfg.we = 1; cfg.sel = CFG_SFIR; cfg.addr = 10'(2 * k);     cfg.data = 32'(hr[k]);
      @(negedge clk); cfg.we = 1; cfg.sel = CFG_SFIR; cfg.addr = 10'(2 * k + 1); cfg.data = 32'(hi[k]);
    end
    @(negedge clk) cfg.we = 0;
  endtask

  task automatic pair(int er, int ei, int orr, int oi);
    in_valid = 1;
    x_even_re = 16'(er); x_even_im = 16'(ei);
    x_odd_re = 16'(orr); x_odd_im = 16'(oi);
    @(negedge clk);
  endtask

  // impulse of value (re, im) * 2^14 on phase `odd`, then zeros; compares
  // the NTAPS full-rate outputs from the impulse on with (re + j im) * h[k] / 4
  task automatic impulse(int re, int im, bit odd);
    int base, yr, yi, wr, wi;
    in_valid = 0;
    repeat (3) @(negedge clk);
    for (int n = 0; n < NTAPS; n++) pair(0, 0, 0, 0);   // flush the delay line
    in_valid = 0;
    repeat (3) @(negedge clk);
    outs.delete();
    if (odd) pair(0, 0, re << 14, im << 14);
    else     pair(re << 14, im << 14, 0, 0);
    for (int n = 0; n < NTAPS / 2 + 1; n++) pair(0, 0, 0, 0);
    in_valid = 0;
    repeat (3) @(negedge clk);
    base = odd ? 1 : 0;                    // full-rate index of the impulse
    for (int k = 0; k < NTAPS; k++) begin
      yr = outs[2 * (base + k)];
      yi = outs[2 * (base + k) + 1];
      wr = int'(rnd_div4(re * hr[k] - im * hi[k]));
      wi = int'(rnd_div4(re * hi[k] + im * hr[k]));
      checks++;
      n_imp++;
      if (yr - wr > 1 || wr - yr > 1 || yi - wi > 1 || wi - yi > 1) begin
        failures++;
        $display("impulse ((%0d,%0d), odd=%0d) tap %0d: got (%0d,%0d) want (%0d,%0d)",
                 re, im, odd, k, yr, yi, wr, wi);
      end
    end
  endtask

  function automatic int rnd_div4(int v);
    return (v + 2) >>> 2;
  endfunction

  initial begin
    rst_n = 0; in_valid = 0; cfg = '0;
    x_even_re = 0; x_even_im = 0; x_odd_re = 0; x_odd_im = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    load();
    for (int n = 0; n < 3000; n++) begin
      in_valid = $urandom_range(0, 4) != 0;
      if (n >= 1000 && n < 1040) begin      // full scale: saturates
        x_even_re = 16'sh7fff; x_even_im = 16'sh7fff;
        x_odd_re  = 16'sh7fff; x_odd_im  = 16'sh7fff;
      end else if (n % 2 == 0) begin
        x_even_re = 16'($urandom); x_even_im = 16'($urandom);
        x_odd_re  = 16'($urandom); x_odd_im  = 16'($urandom);
      end else begin
        x_even_re = 16'($urandom_range(0, 2000) - 1000); x_even_im = 16'($urandom_range(0, 2000) - 1000);
        x_odd_re  = 16'($urandom_range(0, 2000) - 1000); x_odd_im  = 16'($urandom_range(0, 2000) - 1000);
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (n_sat == 0) begin failures++; $display("saturation never reached"); end

    // part 2: impulse responses, real and imaginary, on both phases
    impulse(1, 0, 0);
    impulse(1, 0, 1);
    impulse(0, 1, 0);
    impulse(0, -1, 1);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d outputs missing", exp_q.size() / 5); end
    $display("saturated outputs %0d, impulse taps checked %0d", n_sat, n_imp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
