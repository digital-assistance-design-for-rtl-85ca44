// get_alpha: supply selection and outphasing angles alpha1, alpha2.
//
// For a sample of amplitude A and supply pair (a_i, a_j) the law of cosines
// gives alpha_i = arccos((a_i^2 + A^2 - a_j^2) / (2 A a_i)). As in the source
// design the argument is rewritten as c1*A + c2/A with the programmable
// constants c1 = 1/(2 a_i) and c2 = (a_i^2 - a_j^2)/(2 a_i), chosen by the
// selected supply pair, so no long division is needed. A and 1/A come from
// PWL units for sqrt and 1/sqrt of A^2, after A^2 has been scaled into
// [1/4, 1) by shifting two bits at a time (SqrtPrep).
//
// Stages (one sample per clock):
//   1      A^2 = |I|^2 + |Q|^2 (26 bits, value/2^24)
//   2      supply selection (amp_select); leading-one search on A^2
//   3      SqrtPrep: m = A^2 * 4^j in [1/4,1)
//   4-5    sqrt(m), 1/(2 sqrt(m)) PWL units
//   6      post-shift: A = sqrt(m) 2^-j (Q2.14), 1/A = 2^(j+1)/(2 sqrt(m))
//          (Q.14); c1, c2 of both paths looked up by the pair
//   7      four products c1*A, c2/A
//   8      sums, rounding to Q.15, clamp to [-1,1], sign and magnitude
//   9-10   arccos(|x|)/(pi/2) PWL units (one per path)
//   11     alpha = pi - arccos(|x|) for negative arguments
//   12-15  latency-matching registers, so that the block latency is the 15
//          cycles of the source design
// a1, a2 (and `over`) are delayed to leave together with alpha1, alpha2.
//
// Formats: alpha 15 bits with 2^15 = 2*pi; c1/c2 20-bit signed, value/2^14,
// written through cfg target CFG_C1 / CFG_C2 at address 2*sel + path
// (path 0 computes alpha1 with (a_i,a_j) = (a1,a2), path 1 alpha2 with
// (a_i,a_j) = (a2,a1)). The stage split, formats and padding are this
// design's choices. A = 0 gives 1/A saturated, so the argument clamps.
//
// Lint note: the low 10 bits of the scaled A^2 (m_3) are reported unused.
// The PWL units take only the top bits of the scaled value as their input,
// so dropping the rest is intended.
module get_alpha
  import scs_pkg::*;
(
  input  logic             clk,
  input  cfg_wr_t          cfg,
  input  logic [MAG_W-1:0] abs_i,
  input  logic [MAG_W-1:0] abs_q,
  output logic [ANG_W-1:0] alpha1,
  output logic [ANG_W-1:0] alpha2,
  output logic [SUP_W-1:0] a1,
  output logic [SUP_W-1:0] a2,
  output logic             over
);
  localparam int unsigned SQ_W   = 16;          // sqrt, 1/(2 sqrt) outputs
  localparam int unsigned AQ_W   = 16;          // A, Q2.14
  localparam int unsigned IA_W   = 26;          // 1/A, Q12.14
  localparam int unsigned ARG_W  = 15;          // |arccos argument|, Q0.15
  localparam int unsigned ACOS_W = ANG_W - 2;   // arccos output, 0..pi/2
  localparam int unsigned PA_W   = CONST_W + AQ_W + 1;
  localparam int unsigned PI_W   = CONST_W + IA_W + 1;
  localparam int unsigned SUM_W  = PI_W + 1;

  // ---- programmable constants ----
  logic signed [CONST_W-1:0] c1_tab [14];
  logic signed [CONST_W-1:0] c2_tab [14];
  always_ff @(posedge clk) begin
    if (cfg.we && cfg.sel == CFG_C1 && cfg.addr < 10'd14)
      c1_tab[cfg.addr[3:0]] <= signed'(cfg.data[CONST_W-1:0]);
    if (cfg.we && cfg.sel == CFG_C2 && cfg.addr < 10'd14)
      c2_tab[cfg.addr[3:0]] <= signed'(cfg.data[CONST_W-1:0]);
  end

  // ---- stage 1: A^2 ----
  logic [A2_W-1:0] a2sq_1;
  always_ff @(posedge clk)
    a2sq_1 <= A2_W'(abs_i * abs_i) + A2_W'(abs_q * abs_q);

  // ---- stage 2: supply selection, leading-one search ----
  logic [2:0]       sel_2;
  logic [SUP_W-1:0] a1_2, a2_2;
  logic             over_2;
  amp_select u_sel (.clk, .cfg, .a2_in(a2sq_1), .sel(sel_2), .a1(a1_2), .a2(a2_2), .over(over_2));

  logic [A2_W-1:0]   a2sq_2;
  logic signed [4:0] j_2;     // A^2 = m * 4^-j, j in -1..11
  logic              zero_2;
  always_ff @(posedge clk) begin
    int p;
    p = 0;
    for (int b = 0; b < A2_W; b++)
      if (a2sq_1[b]) p = b;
    a2sq_2 <= a2sq_1;
    zero_2 <= a2sq_1 == '0;
    j_2    <= (p >= 24) ? -5'sd1 : 5'((23 - p) / 2);
  end

  // ---- stage 3: SqrtPrep ----
  logic [23:0]       m_3;
  logic signed [4:0] j_3;
  logic              zero_3;
  logic [2:0]        sel_3;
  always_ff @(posedge clk) begin
    m_3    <= (j_2 < 0) ? 24'(a2sq_2 >> 2) : 24'(a2sq_2 << (2 * j_2));
    j_3    <= j_2;
    zero_3 <= zero_2;
    sel_3  <= sel_2;
  end

  // ---- stages 4-5: sqrt and 1/(2 sqrt) ----
  logic [SQ_W-1:0] sq_5, isq_5;
  pwl_approx #(.IN_W(14), .OUT_W(SQ_W), .K_W(12), .KF(6), .S_W(12), .SF(2),
               .TARGET(CFG_SQRT)) u_sqrt (.clk, .cfg, .x(m_3[23:10]), .y(sq_5));
  pwl_approx #(.IN_W(14), .OUT_W(SQ_W), .K_W(12), .KF(6), .S_W(12), .SF(2),
               .TARGET(CFG_ISQRT)) u_isqrt (.clk, .cfg, .x(m_3[23:10]), .y(isq_5));

  logic signed [4:0] j_4, j_5;
  logic              zero_4, zero_5;
  logic [2:0]        sel_4, sel_5;
  always_ff @(posedge clk) begin
    j_4 <= j_3;  zero_4 <= zero_3;  sel_4 <= sel_3;
    j_5 <= j_4;  zero_5 <= zero_4;  sel_5 <= sel_4;
  end

  // ---- stage 6: post-shift, constant look-up ----
  logic [AQ_W-1:0]           amp_6;
  logic [IA_W-1:0]           inv_6;
  logic signed [CONST_W-1:0] c1p_6 [2];
  logic signed [CONST_W-1:0] c2p_6 [2];
  always_ff @(posedge clk) begin
    logic [IA_W+2-1:0] t;
    amp_6 <= AQ_W'(sq_5 >> (j_5 + 5'sd2));
    t     = (IA_W+2)'(isq_5) << (j_5 + 5'sd1);
    inv_6 <= zero_5 ? '1 : IA_W'(t >> 2);
    for (int p = 0; p < 2; p++) begin
      c1p_6[p] <= c1_tab[{sel_5, 1'(p)}];
      c2p_6[p] <= c2_tab[{sel_5, 1'(p)}];
    end
  end

  // ---- stage 7: products ----
  logic signed [PA_W-1:0] pa_7 [2];
  logic signed [PI_W-1:0] pi_7 [2];
  always_ff @(posedge clk)
    for (int p = 0; p < 2; p++) begin
      pa_7[p] <= PA_W'(c1p_6[p]) * PA_W'(signed'({1'b0, amp_6}));
      pi_7[p] <= PI_W'(c2p_6[p]) * PI_W'(signed'({1'b0, inv_6}));
    end

  // ---- stage 8: argument, Q.28 -> Q.15, clamp ----
  logic [ARG_W-1:0] x_8 [2];
  logic             neg_8 [2];
  always_ff @(posedge clk)
    for (int p = 0; p < 2; p++) begin
      logic signed [SUM_W-1:0] s;
      s = (SUM_W'(pa_7[p]) + SUM_W'(pi_7[p]) + SUM_W'(1 <<< 12)) >>> 13;
      neg_8[p] <= s < 0;
      if (s >= SUM_W'(2**ARG_W - 1) || s <= -SUM_W'(2**ARG_W - 1))
        x_8[p] <= '1;
      else
        x_8[p] <= ARG_W'(s < 0 ? -s : s);
    end

  // ---- stages 9-10: arccos ----
  logic [ACOS_W-1:0] ac_10 [2];
  for (genvar p = 0; p < 2; p++) begin : g_acos
    pwl_approx #(.IN_W(ARG_W), .OUT_W(ACOS_W), .K_W(12), .KF(6), .S_W(12), .SF(2),
                 .TARGET(CFG_ACOS)) u_acos (.clk, .cfg, .x(x_8[p]), .y(ac_10[p]));
  end

  logic neg_9 [2], neg_10 [2];
  always_ff @(posedge clk) begin
    neg_9  <= neg_8;
    neg_10 <= neg_9;
  end

  // ---- stage 11: negative arguments ----
  logic [ANG_W-1:0] al_11 [2];
  always_ff @(posedge clk)
    for (int p = 0; p < 2; p++)
      al_11[p] <= neg_10[p] ? ANG_W'(2**(ANG_W-1)) - ANG_W'(ac_10[p]) : ANG_W'(ac_10[p]);

  // ---- stages 12-15: latency matching ----
  localparam int unsigned PAD = ALPHA_LAT - 11;
  localparam int unsigned SDL = ALPHA_LAT - 2;
  logic [ANG_W-1:0] pad1 [PAD], pad2 [PAD];
  logic [2*SUP_W:0] sdl [SDL];
  always_ff @(posedge clk) begin
    pad1[0] <= al_11[0];
    pad2[0] <= al_11[1];
    for (int k = 1; k < PAD; k++) begin
      pad1[k] <= pad1[k-1];
      pad2[k] <= pad2[k-1];
    end
    sdl[0] <= {over_2, a1_2, a2_2};
    for (int k = 1; k < SDL; k++) sdl[k] <= sdl[k-1];
  end

  assign alpha1 = pad1[PAD-1];
  assign alpha2 = pad2[PAD-1];
  assign {over, a1, a2} = sdl[SDL-1];

endmodule
