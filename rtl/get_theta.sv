// get_theta: phase theta = atan2(Q, I) of a Cartesian sample, plus |I| and |Q|.
//
// The division Q/I is done as Q * (1/I), and both 1/x and arctan(x) are
// computed with the fixed-point PWL unit. Before the approximations the input
// is folded so that both functions only see ranges where their derivatives
// are bounded:
//   divPrep  (stage 1): |I|, |Q| with sign flags; swap so that lo <= hi and
//                       remember the swap; flag the cases lo == hi (45 deg)
//                       and hi == 0.
//   norm     (stage 2): shift hi left until its MSB is set (hi in [1,2)),
//                       remember the shift count.
//   divApprox(3-4)    : 1/(1+u) on the 11 fraction bits u of the shifted hi.
//   divPost  (stage 5): t = lo * (1/hi), shifted back by the shift count,
//                       t = lo/hi in [0,1), 12 bits.
//   atanApprox(6-7)   : arctan(t) / (pi/4), 12 bits, i.e. theta' in units of
//                       2*pi/2^15.
//   atanPost (stage 8): undo the swap (pi/2 - theta') and the quadrant fold.
// |I| and |Q| leave after stage 1 (MAG_LAT = 1) so that getAlpha can start
// early; theta leaves after stage 8 (THETA_LAT = 8, as in the source design).
// One sample per clock, no stalls.
//
// Formats: i_in, q_in 13-bit signed (value/2^12); |I|, |Q| 12-bit, |-1|
// saturates to 4095; theta 15 bits, 2^15 = one full turn. The stage split, the
// number formats and the special cases (lo == hi gives exactly pi/4, I = Q = 0
// gives theta = 0) are this design's choices.
//
// Lint note: the top bit of the normalised divisor (hin2) is reported unused.
// It is always 1 after normalisation, and the 1/x table indexes the bits
// below it. The low 15 bits of the divPost product (p) are the fraction that
// the shift back drops. Both are intended.
module get_theta
  import scs_pkg::*;
(
  input  logic             clk,
  input  cfg_wr_t          cfg,
  input  logic [IQ_W-1:0]  i_in,
  input  logic [IQ_W-1:0]  q_in,
  output logic [MAG_W-1:0] abs_i,
  output logic [MAG_W-1:0] abs_q,
  output logic [ANG_W-1:0] theta
);
  typedef struct packed {
    logic neg_i;
    logic neg_q;
    logic swap;
    logic eq;
    logic zero;
  } flags_t;

  localparam int unsigned RECIP_W = 16;

  function automatic logic [MAG_W-1:0] sat_abs(logic [IQ_W-1:0] v);
    logic [IQ_W-1:0] a;
    a = v[IQ_W-1] ? IQ_W'(-signed'(v)) : v;
    return a[IQ_W-1] ? '1 : a[MAG_W-1:0];   // only -4096 reaches bit 12
  endfunction

  // ---- stage 1: divPrep ----
  flags_t           f1;
  logic [MAG_W-1:0] hi1, lo1;
  always_ff @(posedge clk) begin
    logic [MAG_W-1:0] ai, aq;
    ai = sat_abs(i_in);
    aq = sat_abs(q_in);
    abs_i    <= ai;
    abs_q    <= aq;
    f1.neg_i <= i_in[IQ_W-1];
    f1.neg_q <= q_in[IQ_W-1];
    f1.swap  <= aq > ai;
    f1.eq    <= aq == ai;
    f1.zero  <= (ai == '0) && (aq == '0);
    hi1      <= (aq > ai) ? aq : ai;
    lo1      <= (aq > ai) ? ai : aq;
  end

  // ---- stage 2: normalise hi to [1,2) ----
  flags_t           f2;
  logic [MAG_W-1:0] hin2, lo2;
  logic [3:0]       sh2;
  always_ff @(posedge clk) begin
    logic [3:0] lz;
    lz = 4'(MAG_W - 1);
    for (int b = 0; b < MAG_W; b++)
      if (hi1[b]) lz = 4'(MAG_W - 1 - b);
    f2   <= f1;
    lo2  <= lo1;
    sh2  <= lz;
    hin2 <= hi1 << lz;
  end

  // ---- stages 3-4: 1/(1+u) ----
  logic [RECIP_W-1:0] recip4;
  pwl_approx #(.IN_W(MAG_W - 1), .OUT_W(RECIP_W), .K_W(10), .KF(2), .S_W(12), .SF(4),
               .TARGET(CFG_RECIP)) u_div (
    .clk, .cfg, .x(hin2[MAG_W-2:0]), .y(recip4));

  flags_t           f3, f4;
  logic [MAG_W-1:0] lo3, lo4;
  logic [3:0]       sh3, sh4;
  always_ff @(posedge clk) begin
    f3 <= f2;  lo3 <= lo2;  sh3 <= sh2;
    f4 <= f3;  lo4 <= lo3;  sh4 <= sh3;
  end

  // ---- stage 5: divPost, t = lo * 1/hi ----
  // lo*recip/2^15 = lo*4096/hin; shifting left by sh gives lo/hi * 4096.
  flags_t           f5;
  logic [MAG_W-1:0] t5;
  always_ff @(posedge clk) begin
    logic [MAG_W+RECIP_W+15-1:0] p;
    p  = ((MAG_W+RECIP_W+15)'(lo4) * recip4) << sh4;
    f5 <= f4;
    t5 <= (p[MAG_W+RECIP_W+15-1:15] > (MAG_W+RECIP_W)'(2**MAG_W - 1)) ? '1 : p[15 +: MAG_W];
  end

  // ---- stages 6-7: arctan(t)/(pi/4) ----
  logic [MAG_W-1:0] atan7;
  pwl_approx #(.IN_W(MAG_W), .OUT_W(MAG_W), .K_W(10), .KF(7), .S_W(11), .SF(3),
               .TARGET(CFG_ATAN)) u_atan (
    .clk, .cfg, .x(t5), .y(atan7));

  flags_t f6, f7;
  always_ff @(posedge clk) begin
    f6 <= f5;
    f7 <= f6;
  end

  // ---- stage 8: atanPost ----
  localparam logic [ANG_W-1:0] QTR = ANG_W'(2**(ANG_W-2));  // pi/2
  localparam logic [ANG_W-1:0] EIG = ANG_W'(2**(ANG_W-3));  // pi/4
  always_ff @(posedge clk) begin
    logic [ANG_W-1:0] tp;
    tp = f7.zero ? '0 : (f7.eq ? EIG : ANG_W'(atan7));
    if (f7.swap) tp = QTR - tp;
    case ({f7.neg_i, f7.neg_q})
      2'b00:   theta <= tp;
      2'b10:   theta <= 2 * QTR - tp;
      2'b11:   theta <= 2 * QTR + tp;
      default: theta <= ANG_W'(4 * QTR - tp);   // wraps 2^15 to 0
    endcase
  end

endmodule
