// pwl_approx: fixed-point piece-wise-linear (PWL) evaluation of a smooth
// one-variable function y = f(x), x and y both unsigned fractions in [0,1).
//
// The input x (IN_W bits) is split into its M1 most significant bits, the
// interval index i, and the M2 = IN_W-M1 remaining bits x2. A programmable LUT
// holds per interval a coarse value b_i (B_W bits, the MSBs of the output), a
// slope k_i (signed, KF fraction bits) and an offset S_i (signed, SF fraction
// bits, in units of one input LSB). The output is
//     y = b_i * 2^(OUT_W-B_W) + k_i * (x2 - S_i)
// so that, as in the source design, the multiplier and the subtractor only
// see operands of about half the input length. The offset S_i absorbs the
// quantization error of b_i (S_i = (b_i - b_i_real) / k_i).
//
// Pipeline (as described for the source design): stage 1 does the table look-up
// and the subtraction x2 - S_i, stage 2 the multiplication. Latency 2 cycles,
// one result per cycle.
//
// Own choices: the source design concatenates b_i and the low part; this unit
// adds them instead (with rounding of the product and saturation of y to
// [0, 2^OUT_W-1]), which stays correct when the low part of an interval
// crosses a multiple of 2^(OUT_W-B_W). The LUT is register based and
// programmable: a write to cfg target TARGET at address i loads
// {b_i, k_i, S_i} from cfg.data[B_W+K_W+S_W-1:0] (b_i in the MSBs).
module pwl_approx
  import scs_pkg::*;
#(
  parameter int unsigned IN_W   = 12,
  parameter int unsigned M1     = PWL_M1,
  parameter int unsigned OUT_W  = 12,
  parameter int unsigned B_W    = PWL_M1,
  parameter int unsigned K_W    = 10,
  parameter int unsigned KF     = 7,
  parameter int unsigned S_W    = 11,
  parameter int unsigned SF     = 3,
  parameter cfg_target_e TARGET = CFG_ATAN
) (
  input  logic             clk,
  input  cfg_wr_t          cfg,
  input  logic [IN_W-1:0]  x,
  output logic [OUT_W-1:0] y
);
  localparam int unsigned M2     = IN_W - M1;
  localparam int unsigned LUT_W  = B_W + K_W + S_W;
  localparam int unsigned BSH    = OUT_W - B_W;
  localparam int unsigned D_W    = ((M2 + SF + 1) > S_W ? (M2 + SF + 1) : S_W) + 1;
  localparam int unsigned P_W    = K_W + D_W;
  localparam int unsigned SH     = KF + SF;
  localparam int unsigned Y_W    = (P_W > OUT_W + 1 ? P_W : OUT_W + 1) + 1;
  localparam logic signed [P_W-1:0] RND = P_W'(1) <<< (SH - 1);

  logic [LUT_W-1:0] lut [2**M1];

  always_ff @(posedge clk)
    if (cfg.we && cfg.sel == TARGET)
      lut[cfg.addr[M1-1:0]] <= cfg.data[LUT_W-1:0];

  // Stage 1: look-up and x2 - S_i
  logic [M1-1:0]         idx;
  logic [M2-1:0]         x2;
  logic [LUT_W-1:0]      word;
  logic [B_W-1:0]        b_1;
  logic signed [K_W-1:0] k_1;
  logic signed [D_W-1:0] d_1;

  assign idx  = x[IN_W-1 -: M1];
  assign x2   = x[M2-1:0];
  assign word = lut[idx];

  always_ff @(posedge clk) begin
    b_1 <= word[LUT_W-1 -: B_W];
    k_1 <= signed'(word[S_W +: K_W]);
    d_1 <= signed'(D_W'({x2, SF'(0)})) - D_W'(signed'(word[S_W-1:0]));
  end

  // Stage 2: k_i * (x2 - S_i), rounding, add b_i, saturate
  logic signed [P_W-1:0] prod;
  logic signed [Y_W-1:0] ysum;

  always_comb begin
    prod = P_W'(k_1) * P_W'(d_1);
    ysum = Y_W'(signed'({1'b0, b_1, BSH'(0)}))
         + Y_W'((prod + RND) >>> SH);
  end

  always_ff @(posedge clk) begin
    if (ysum < 0)                               y <= '0;
    else if (ysum > Y_W'((2**OUT_W) - 1))       y <= '1;
    else                                        y <= ysum[OUT_W-1:0];
  end

endmodule
