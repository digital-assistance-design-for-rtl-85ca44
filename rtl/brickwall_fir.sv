// brickwall_fir: long-tap FIR for two-way interleaved samples, with the
// output decimated by two.
//
// In the compensated baseband, the correction filters are built in two
// steps. The input is first taken to twice the rate by two-way
// interleaving. Short FIRs then shape a response that is continuous at
// +-pi. Finally a shared linear-phase brickwall low-pass removes the upper
// half band, and the result is decimated by two. This module is that last
// step. Every clock it takes the pair x[2m] (x_even) and x[2m+1] (x_odd) and
// produces one output
//     y[m] = sum_{k=0}^{NTAPS-1} h[k] * x[2m+1-k]
// i.e. the full-rate filter output at the odd sample instants. It computes
// only the outputs that survive the decimation, so it uses NTAPS multipliers
// rather than 2*NTAPS.
//
// Timing: the delay line shifts by two samples on each clock with in_valid.
// y is registered on the next edge, together with out_valid. A pair taken at
// edge k gives its output at edge k+1, and the latency is 2 cycles. The delay
// line is cleared by reset, so the first outputs see zeros.
//
// Taps: COEF_W-bit signed, value/2^COEF_F, written through cfg target CFG_FIR
// at address k. Samples are 16-bit signed. The output is rounded, saturated
// and has the input's scale.
//
// From the source design: the 100-tap length, the two-way interleaved input,
// the decimation by two, and programmable taps ('all the parameters in the
// compensator are programmable'). This design's own choices: the word widths,
// the single-cycle sum, and taps that are not forced to be symmetric (the
// linear-phase property is left to the tap values).
module brickwall_fir
  import scs_pkg::*;
#(
  parameter int unsigned NTAPS  = 100,
  parameter int unsigned X_W    = 16,
  parameter int unsigned COEF_W = 18,
  parameter int unsigned COEF_F = 17
) (
  input  logic                clk,
  input  logic                rst_n,
  input  cfg_wr_t             cfg,
  input  logic                in_valid,
  input  logic signed [X_W-1:0] x_even,
  input  logic signed [X_W-1:0] x_odd,
  output logic                out_valid,
  output logic signed [X_W-1:0] y
);
  localparam int unsigned ACC_W = X_W + COEF_W + $clog2(NTAPS) + 1;
  localparam logic signed [ACC_W-1:0] RND  = ACC_W'(1) <<< (COEF_F - 1);
  localparam logic signed [ACC_W-1:0] YMAX = ACC_W'((1 << (X_W - 1)) - 1);

  logic signed [COEF_W-1:0] h [NTAPS];
  always_ff @(posedge clk)
    if (cfg.we && cfg.sel == CFG_FIR && 32'(cfg.addr) < NTAPS)
      h[cfg.addr[$clog2(NTAPS)-1:0]] <= cfg.data[COEF_W-1:0];

  // x_line[0] is the newest sample x[2m+1], x_line[1] = x[2m], ...
  logic signed [X_W-1:0] x_line [NTAPS];
  logic                  v1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < NTAPS; k++) x_line[k] <= '0;
    end else if (in_valid) begin
      x_line[0] <= x_odd;
      x_line[1] <= x_even;
      for (int k = 2; k < NTAPS; k++) x_line[k] <= x_line[k-2];
    end
    v1 <= rst_n && in_valid;
  end

  logic signed [ACC_W-1:0] acc, yr;

  always_comb begin
    acc = '0;
    for (int k = 0; k < NTAPS; k++)
      acc += ACC_W'(h[k]) * ACC_W'(x_line[k]);
    yr = (acc + RND) >>> COEF_F;
  end

  always_ff @(posedge clk) begin
    out_valid <= rst_n && v1;
    if (yr > YMAX)        y <= X_W'(YMAX);
    else if (yr < -YMAX - 1) y <= X_W'(-YMAX - 1);
    else                  y <= yr[X_W-1:0];
  end

endmodule
