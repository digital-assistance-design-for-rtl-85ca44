// comp_short_fir: complex-valued short-tap FIR for two-way interleaved
// complex samples, the first filter step of the compensator's linear part.
//
// The correction the compensator needs has a transfer function with jumps at
// +-pi, which a plain FIR can only follow with many taps. The compensated
// baseband therefore runs this part at twice the sample rate (two-way
// interleaving). There the response can be made continuous at +-pi, and a
// short FIR is enough. The band edge is then cut by the shared long
// brickwall filter (brickwall_fir), followed by decimation by two. This
// module is one such short filter. Every clock it takes the complex pair
// x[2n] (x_even) and x[2n+1] (x_odd) and produces both full-rate outputs
//     y[j] = sum_{k=0}^{NTAPS-1} h[k] * x[j-k],   j = 2n, 2n+1
// with complex taps h[k] and complex products
//     re = hr*xr - hi*xi,   im = hr*xi + hi*xr.
//
// Timing: the delay line shifts by two samples on each clock with in_valid.
// Both outputs are registered on the next edge, together with out_valid. A
// pair taken at edge k gives its outputs at edge k+1, a latency of 2 cycles.
// The delay line is cleared by reset, so the first outputs see zeros.
//
// Taps: COEF_W-bit signed, value/2^COEF_F, written through cfg target
// CFG_SFIR, the real part of h[k] at address 2k and the imaginary part at
// 2k+1. Samples are X_W-bit signed. Outputs are rounded, saturated and keep
// the input's scale.
//
// From the source design: complex-valued short-tap FIRs on complex samples
// in two-way interleaving, with programmable coefficients ('all the
// parameters in the compensator are programmable'). This design's own
// choices: the tap count (the source design says only 'short-tap'), the word
// widths, the tap addressing and the single-cycle sum. The source design
// uses several of these filters (two per PA, one per mode) and adds their
// real and imaginary results into the brickwall filters' inputs; that
// combination is not part of this module.
module comp_short_fir
  import scs_pkg::*;
#(
  parameter int unsigned NTAPS  = 8,
  parameter int unsigned X_W    = 16,
  parameter int unsigned COEF_W = 18,
  parameter int unsigned COEF_F = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  cfg_wr_t               cfg,
  input  logic                  in_valid,
  input  logic signed [X_W-1:0] x_even_re,
  input  logic signed [X_W-1:0] x_even_im,
  input  logic signed [X_W-1:0] x_odd_re,
  input  logic signed [X_W-1:0] x_odd_im,
  output logic                  out_valid,
  output logic signed [X_W-1:0] y_even_re,
  output logic signed [X_W-1:0] y_even_im,
  output logic signed [X_W-1:0] y_odd_re,
  output logic signed [X_W-1:0] y_odd_im
);
  localparam int unsigned ACC_W = X_W + COEF_W + $clog2(NTAPS) + 2;
  localparam int unsigned TAP_AW = $clog2(NTAPS);
  localparam logic signed [ACC_W-1:0] RND  = ACC_W'(1) <<< (COEF_F - 1);
  localparam logic signed [ACC_W-1:0] YMAX = ACC_W'((1 << (X_W - 1)) - 1);

  logic signed [COEF_W-1:0] hr [NTAPS], hi [NTAPS];
  always_ff @(posedge clk)
    if (cfg.we && cfg.sel == CFG_SFIR && 32'(cfg.addr) < 2 * NTAPS) begin
      if (cfg.addr[0]) hi[cfg.addr[TAP_AW:1]] <= cfg.data[COEF_W-1:0];
      else             hr[cfg.addr[TAP_AW:1]] <= cfg.data[COEF_W-1:0];
    end

  // xr[0]/xi[0] hold the newest sample x[2n+1], [1] = x[2n], ...
  // NTAPS + 1 samples: the odd output uses [0..NTAPS-1], the even [1..NTAPS].
  logic signed [X_W-1:0] xr [NTAPS+1], xi [NTAPS+1];
  logic                  v1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k <= NTAPS; k++) begin
        xr[k] <= '0;
        xi[k] <= '0;
      end
    end else if (in_valid) begin
      xr[0] <= x_odd_re;   xi[0] <= x_odd_im;
      xr[1] <= x_even_re;  xi[1] <= x_even_im;
      for (int k = 2; k <= NTAPS; k++) begin
        xr[k] <= xr[k-2];
        xi[k] <= xi[k-2];
      end
    end
    v1 <= rst_n && in_valid;
  end

  function automatic logic signed [X_W-1:0] sat(logic signed [ACC_W-1:0] acc);
    logic signed [ACC_W-1:0] r;
    r = (acc + RND) >>> COEF_F;
    if (r > YMAX)           return X_W'(YMAX);
    else if (r < -YMAX - 1) return X_W'(-YMAX - 1);
    else                    return r[X_W-1:0];
  endfunction

  logic signed [ACC_W-1:0] acc_er, acc_ei, acc_or, acc_oi;

  always_comb begin
    acc_er = '0; acc_ei = '0; acc_or = '0; acc_oi = '0;
    for (int k = 0; k < NTAPS; k++) begin
      acc_or += ACC_W'(hr[k]) * ACC_W'(xr[k])   - ACC_W'(hi[k]) * ACC_W'(xi[k]);
      acc_oi += ACC_W'(hr[k]) * ACC_W'(xi[k])   + ACC_W'(hi[k]) * ACC_W'(xr[k]);
      acc_er += ACC_W'(hr[k]) * ACC_W'(xr[k+1]) - ACC_W'(hi[k]) * ACC_W'(xi[k+1]);
      acc_ei += ACC_W'(hr[k]) * ACC_W'(xi[k+1]) + ACC_W'(hi[k]) * ACC_W'(xr[k+1]);
    end
  end

  always_ff @(posedge clk) begin
    out_valid <= rst_n && v1;
    y_even_re <= sat(acc_er);
    y_even_im <= sat(acc_ei);
    y_odd_re  <= sat(acc_or);
    y_odd_im  <= sat(acc_oi);
  end

endmodule
