// tb_brickwall_fir: self-checking test of the decimating brickwall FIR.
//
// Part 1 loads random taps and streams random interleaved sample pairs with
// gaps in in_valid. Each output is compared bit-exactly with a model of
// y[m] = sum_k h[k] x[2m+1-k] (rounded and saturated) and must appear exactly
// one edge after its pair was taken (latency 2 cycles). Full-scale inputs
// drive the output into saturation at least once.
// Part 2 loads a 100-tap half-band low-pass (Hann-windowed sinc, cut-off at
// a quarter of the full sample rate) and checks the brickwall behaviour
// after decimation, measuring tone amplitudes from the mean output power. A
// tone at 0.1 of the full rate passes with gain 1 +-2%. A tone at 0.4 of the
// full rate is suppressed below 1%.
`timescale 1ns/1ps
module tb_brickwall_fir;
  import scs_pkg::*;
  import scs_tb_pkg::*;

  localparam int NTAPS = 100;
  logic clk = 0;
  always #1 clk = ~clk;
  logic rst_n, in_valid, out_valid;
  cfg_wr_t cfg;
  logic signed [15:0] x_even, x_odd, y;

  brickwall_fir dut (.clk, .rst_n, .cfg, .in_valid, .x_even, .x_odd, .out_valid, .y);

  int checks = 0, failures = 0, cyc = 0, n_sat = 0;
  int h [NTAPS];
  int xs [$];               // full-rate input history
  int exp_q [$];            // flattened: cycle, value
  bit model_on = 1;
  real pk = 0.0;            // sum of y^2 in the tone tests
  int  npk = 0;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model();
    longint acc = 1 <<< 16;
    for (int k = 0; k < NTAPS; k++)
      if (xs.size() - 1 - k >= 0) acc += longint'(h[k]) * xs[xs.size() - 1 - k];
    acc = acc >>> 17;
    if (acc > 32767) acc = 32767;
    if (acc < -32768) acc = -32768;
    return int'(acc);
  endfunction

  always @(posedge clk) begin
    #0.1;
    cyc++;
    if (rst_n && in_valid) begin
      xs.push_back(int'(x_even));
      xs.push_back(int'(x_odd));
      exp_q.push_back(cyc + 1);
      exp_q.push_back(model());
    end
    if (out_valid) begin
      automatic int t, v;
      checks++;
      if (exp_q.size() < 2) begin
        failures++; $display("unexpected output at %0d", cyc);
      end else begin
        t = exp_q.pop_front(); v = exp_q.pop_front();
        if (t != cyc || (model_on && int'(y) != v)) begin
          failures++;
          if (failures < 10) $display("cycle %0d (expected %0d): y=%0d want %0d", cyc, t, y, v);
        end
        if (y == 16'sh7fff || y == -16'sh8000) n_sat++;
        if (!model_on) begin pk += real'(y) * real'(y); npk++; end
      end
    end
  end

  task automatic load(bit halfband);
    for (int k = 0; k < NTAPS; k++) begin
      if (halfband) begin
        automatic real t = real'(k) - 49.5;
        automatic real w = 0.5 - 0.5 * $cos(2.0 * PI * (real'(k) + 0.5) / real'(NTAPS));
        h[k] = int'(rnd(0.5 * $sin(PI * t / 2.0) / (PI * t / 2.0) * w * 131072.0));
      end else begin
        h[k] = $urandom_range(0, 40000) - 20000;
      end
      @(negedge clk); cfg.we = 1; cfg.sel = CFG_FIR; cfg.addr = 10'(k); cfg.data = 32'(h[k]);
    end
    @(negedge clk) cfg.we = 0;
  endtask

  // tone at f (cycles per full-rate sample), amplitude 0.5 full scale
  task automatic tone(real f, int pairs);
    for (int m = 0; m < pairs; m++) begin
      in_valid = 1;
      x_even = 16'(rnd(16384.0 * $cos(2.0 * PI * f * real'(2 * m))));
      x_odd  = 16'(rnd(16384.0 * $cos(2.0 * PI * f * real'(2 * m + 1))));
      @(negedge clk);
    end
  endtask

  initial begin
    real dc_sum;
    rst_n = 0; in_valid = 0; x_even = 0; x_odd = 0; cfg = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    load(0);
    for (int n = 0; n < 3000; n++) begin
      in_valid = $urandom_range(0, 4) != 0;
      if (n >= 1000 && n < 1100) begin      // full scale, same sign: saturates
        x_even = 16'sh7fff; x_odd = 16'sh7fff;
      end else begin
        x_even = 16'($urandom); x_odd = 16'($urandom);
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (n_sat == 0) begin failures++; $display("saturation never reached"); end

    // part 2: half-band low-pass
    load(1);
    dc_sum = 0.0;
    for (int k = 0; k < NTAPS; k++) dc_sum += real'(h[k]) / 131072.0;
    checks++;
    if (dc_sum < 0.99 || dc_sum > 1.01) begin failures++; $display("DC gain of taps %f", dc_sum); end
    model_on = 0;
    tone(0.1, 60);                  // settle
    pk = 0.0; npk = 0;
    tone(0.1, 100);
    pk = $sqrt(2.0 * pk / real'(npk));   // amplitude from the mean power
    checks++;
    if (pk < 0.98 * 16384.0 || pk > 1.02 * 16384.0) begin
      failures++; $display("pass-band tone amplitude %f", pk / 16384.0);
    end
    tone(0.4, 60);
    pk = 0.0; npk = 0;
    tone(0.4, 100);
    pk = $sqrt(2.0 * pk / real'(npk));
    checks++;
    if (pk > 0.01 * 16384.0) begin failures++; $display("stop-band tone amplitude %f", pk / 16384.0); end
    $display("half-band filter: stop-band amplitude %f", pk / 16384.0);
    in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d outputs missing", exp_q.size() / 2); end
    $display("saturated outputs %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
