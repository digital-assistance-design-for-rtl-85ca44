// iq2phi: converts a Cartesian correction (dI, dQ) into phase corrections
// (dphi1, dphi2) of the two outphasing paths.
//
// With I = a1 cos(phi1) + a2 cos(phi2) and Q = a1 sin(phi1) + a2 sin(phi2),
// a small change of the two phases moves the sum by the Jacobian of (I,Q).
// Solving it for the phase changes gives
//     dphi1 = (dI cos(phi2) + dQ sin(phi2)) / (a1 sin(phi2 - phi1))
//     dphi2 = (dI cos(phi1) + dQ sin(phi1)) / (a2 sin(phi1 - phi2))
// The source design prints the two denominators with phi1 - phi2 and phi2 - phi1
// exchanged. That is the same formula with both signs flipped. This unit
// follows the derivation, so adding dphi1, dphi2 to the phases moves the
// output vector by +(dI, dQ).
//
// How: all five trigonometric values come from one quarter-wave sine PWL
// table, reached through the 2-bit quadrant fold used elsewhere in the
// baseband (cos(x) = sin(x + pi/2)). The division by sin(phi2 - phi1) reuses
// the normalise / 1/(1+u) PWL / shift-back scheme of getTheta. The division by
// the supply amplitude, and the conversion from radians to angle codes, is one
// multiplication by a programmable per-code factor g = 2^15/(2*pi*V).
//   stage 1     quadrant fold of phi1, phi2, phi2 - phi1 (five sine inputs)
//   stages 2-3  five sine PWL units (CFG_SIN, 13-bit in, 16-bit out)
//   stage 4     signs applied; numerators n1, n2 (four products, rounded to
//               Q.16); |sin(phi2 - phi1)| normalised to [1,2)
//   stages 5-6  1/(1+u) PWL unit (CFG_RECIP, the same table as getTheta)
//   stage 7     n * 1/|s|; g looked up by the supply codes
//   stage 8     times g
//   stage 9     shift back, sign, round and saturate to +-(2^14 - 1)
// Latency 9 cycles, one sample per clock.
//
// Interface: phi1, phi2 are 15-bit angles (2^15 = 2*pi). a1, a2 are 2-bit
// supply codes. d_i and d_q are 16-bit signed with value/2^15. dphi1 and
// dphi2 are 15-bit two's-complement angle codes. When sin(phi2 - phi1) is
// zero the phases are parallel and no correction exists: both outputs are 0
// and `sing` is raised.
//
// From the source design: the function, its inputs (amplitudes and phases of
// both paths plus dI, dQ) and the use of PWL approximation. This design's own
// choices: the pipeline, all formats, the g table, and the singular case.
//
// Lint note: bits of the normalised |sin| (snorm) are reported unused. The
// leading one (always 1 after normalisation) and the low bits below the
// 11-bit 1/(1+u) table input are dropped on purpose.
module iq2phi
  import scs_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  cfg_wr_t          cfg,
  input  logic             in_valid,
  input  logic [ANG_W-1:0] phi1,
  input  logic [ANG_W-1:0] phi2,
  input  logic [SUP_W-1:0] a1,
  input  logic [SUP_W-1:0] a2,
  input  logic [15:0]      d_i,
  input  logic [15:0]      d_q,
  output logic             out_valid,
  output logic [ANG_W-1:0] dphi1,
  output logic [ANG_W-1:0] dphi2,
  output logic             sing
);
  localparam int unsigned SIN_IN = ANG_W - 2;   // 13-bit quarter-wave argument
  localparam int unsigned SIN_W  = 16;          // sine magnitude, value/2^16
  localparam int unsigned G_W    = 24;          // g, value/2^GF
  localparam int unsigned GF     = 6;
  localparam int unsigned N_W    = 19;          // numerators, Q.16, |n| <= 2
  localparam int unsigned P_W    = N_W + SIN_W + 2 + G_W;
  localparam int unsigned LAT    = 9;
  localparam logic signed [ANG_W-1:0] DMAX = ANG_W'((1 << (ANG_W - 1)) - 1);

  // ---- g table ----
  logic [G_W-1:0] g_tab [1 << SUP_W];
  always_ff @(posedge clk)
    if (cfg.we && cfg.sel == CFG_INVA)
      g_tab[cfg.addr[SUP_W-1:0]] <= cfg.data[G_W-1:0];

  // ---- stage 1: quadrant fold ----
  // index 0: cos phi1, 1: sin phi1, 2: cos phi2, 3: sin phi2, 4: sin(phi2-phi1)
  logic [ANG_W-1:0]  ang [5];
  logic [SIN_IN-1:0] s_in [5];
  logic [4:0]        top1, bot1, neg1;
  logic [15:0]       di1, dq1;
  logic [SUP_W-1:0]  a1_1, a2_1;

  always_comb begin
    ang[0] = phi1 + ANG_W'(1 << SIN_IN);
    ang[1] = phi1;
    ang[2] = phi2 + ANG_W'(1 << SIN_IN);
    ang[3] = phi2;
    ang[4] = phi2 - phi1;
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < 5; k++) begin
      // quadrants 1 and 3 run the quarter wave backwards; their r = 0 is
      // the peak, which the table (in [0,1)) cannot hold: flag it. The zero
      // crossings are flagged as exact zeros so that sin(0) = sin(pi) = 0.
      s_in[k] <= ang[k][SIN_IN] ? SIN_IN'(-ang[k][SIN_IN-1:0]) : ang[k][SIN_IN-1:0];
      top1[k] <= ang[k][SIN_IN] && (ang[k][SIN_IN-1:0] == '0);
      bot1[k] <= !ang[k][SIN_IN] && (ang[k][SIN_IN-1:0] == '0);
      neg1[k] <= ang[k][ANG_W-1];
    end
    di1  <= d_i;
    dq1  <= d_q;
    a1_1 <= a1;
    a2_1 <= a2;
  end

  // ---- stages 2-3: sine PWL ----
  logic [SIN_W-1:0] s_y [5];
  for (genvar k = 0; k < 5; k++) begin : g_sin
    pwl_approx #(.IN_W(SIN_IN), .OUT_W(SIN_W), .K_W(11), .KF(6), .S_W(14), .SF(1),
                 .TARGET(CFG_SIN)) u_sin (
      .clk, .cfg, .x(s_in[k]), .y(s_y[k]));
  end

  logic [4:0]       top3, bot3, neg3;
  logic [15:0]      di3, dq3;
  logic [SUP_W-1:0] a1_3, a2_3;
  pipe_delay #(.W(15 + 32 + 2 * SUP_W), .DEPTH(2)) u_d13 (
    .clk, .rst_n,
    .d({top1, bot1, neg1, di1, dq1, a1_1, a2_1}),
    .q({top3, bot3, neg3, di3, dq3, a1_3, a2_3}));

  // ---- stage 4: signs, numerators, normalisation ----
  logic signed [SIN_W+1:0] v [5];     // signed sine values, value/2^16
  logic [SIN_W:0]          smag;      // |sin(phi2 - phi1)|, value/2^16
  logic [4:0]              sh4c;
  logic [SIN_W:0]          snorm;
  logic signed [N_W+16:0]  n1c, n2c;

  always_comb begin
    for (int k = 0; k < 5; k++) begin
      logic [SIN_W:0] m;
      m    = top3[k] ? (SIN_W+1)'(1 << SIN_W) : bot3[k] ? '0 : {1'b0, s_y[k]};
      v[k] = neg3[k] ? -$signed({1'b0, m}) : $signed({1'b0, m});
    end
    smag = top3[4] ? (SIN_W+1)'(1 << SIN_W) : bot3[4] ? '0 : {1'b0, s_y[4]};
    sh4c = '0;
    for (int b = 0; b <= SIN_W; b++)
      if (smag[b]) sh4c = 5'(SIN_W - b);
    snorm = smag << sh4c;
    // products are Q.15 * Q.16 = Q.31; the sums fit N_W+17 bits
    n1c = (N_W+17)'($signed(di3) * v[2]) + (N_W+17)'($signed(dq3) * v[3]);
    n2c = (N_W+17)'($signed(di3) * v[0]) + (N_W+17)'($signed(dq3) * v[1]);
  end

  logic signed [N_W-1:0] n1_4, n2_4;
  logic [10:0]           u4;
  logic [4:0]            sh4;
  logic                  zero4, sneg4;
  logic [SUP_W-1:0]      a1_4, a2_4;

  always_ff @(posedge clk) begin
    n1_4  <= N_W'((n1c + (N_W+17)'(1 << 14)) >>> 15);
    n2_4  <= N_W'((n2c + (N_W+17)'(1 << 14)) >>> 15);
    u4    <= snorm[SIN_W-1 -: 11];
    sh4   <= sh4c;
    zero4 <= smag == '0;
    sneg4 <= neg3[4];
    a1_4  <= a1_3;
    a2_4  <= a2_3;
  end

  // ---- stages 5-6: 1/(1+u) ----
  logic [15:0] recip6;
  pwl_approx #(.IN_W(11), .OUT_W(16), .K_W(10), .KF(2), .S_W(12), .SF(4),
               .TARGET(CFG_RECIP)) u_recip (
    .clk, .cfg, .x(u4), .y(recip6));

  logic signed [N_W-1:0] n1_6, n2_6;
  logic [4:0]            sh6;
  logic                  zero6, sneg6;
  logic [SUP_W-1:0]      a1_6, a2_6;
  pipe_delay #(.W(2 * N_W + 5 + 2 + 2 * SUP_W), .DEPTH(2)) u_d46 (
    .clk, .rst_n,
    .d({n1_4, n2_4, sh4, zero4, sneg4, a1_4, a2_4}),
    .q({n1_6, n2_6, sh6, zero6, sneg6, a1_6, a2_6}));

  // ---- stage 7: n / |s| (mantissa), g look-up ----
  logic signed [N_W+17:0] t1_7, t2_7;
  logic [G_W-1:0]         g1_7, g2_7;
  logic [4:0]             sh7, sh8;
  logic                   zero7, sneg7, zero8, sneg8;

  always_ff @(posedge clk) begin
    t1_7  <= (N_W+18)'(n1_6) * (N_W+18)'($signed({2'b00, recip6}));
    t2_7  <= (N_W+18)'(n2_6) * (N_W+18)'($signed({2'b00, recip6}));
    g1_7  <= g_tab[a1_6];
    g2_7  <= g_tab[a2_6];
    sh7   <= sh6;
    zero7 <= zero6;
    sneg7 <= sneg6;
  end

  // ---- stage 8: times g ----
  logic signed [P_W-1:0] p1_8, p2_8;

  always_ff @(posedge clk) begin
    p1_8  <= P_W'(t1_7) * P_W'($signed({1'b0, g1_7}));
    p2_8  <= P_W'(t2_7) * P_W'($signed({1'b0, g2_7}));
    sh8   <= sh7;
    zero8 <= zero7;
    sneg8 <= sneg7;
  end

  // ---- stage 9: shift back, sign, saturate ----
  // value: n/2^16 * recip/2^16 * 2^sh * g/2^GF  ->  shift right 32+GF-sh
  function automatic logic [ANG_W-1:0] finish(logic signed [P_W-1:0] p,
                                              logic [4:0] sh, logic neg);
    logic [5:0]            rs;
    logic signed [P_W-1:0] r;
    rs = 6'(32 + GF) - 6'(sh);
    r  = (p + (P_W'(1) <<< (rs - 1))) >>> rs;
    if (neg) r = -r;
    if (r > P_W'(DMAX))       return DMAX;
    else if (r < -P_W'(DMAX)) return -DMAX;
    else                      return r[ANG_W-1:0];
  endfunction

  always_ff @(posedge clk) begin
    // dphi1 divides by sin(phi2-phi1), dphi2 by sin(phi1-phi2) = -sin(phi2-phi1)
    dphi1 <= zero8 ? '0 : finish(p1_8, sh8, sneg8);
    dphi2 <= zero8 ? '0 : finish(p2_8, sh8, !sneg8);
    sing  <= zero8;
  end

  pipe_delay #(.W(1), .DEPTH(LAT), .RESET(1'b1)) u_vld (
    .clk, .rst_n, .d(in_valid), .q(out_valid));

endmodule
