// scs_pkg: types and constants shared by the outphasing baseband.
//
// The baseband has several programmable tables (the six piece-wise-linear
// coefficient LUTs, the supply-selection thresholds, the arccos-argument
// constants c1/c2, the symbol predistorter, the shaping-filter taps and the
// tables of the compensator's nonlinear functions, phase converter and FIRs). All of
// them are written through one configuration write port, cfg_wr_t: a target
// selector, a word address inside the target and a 32-bit data word, written
// in the cycle `we` is high. The bus layout and the number formats listed here
// are this design's own choices; the source design gives the table sizes and
// the 7-bit LUT address width but no register map.
//
// Number formats used across module boundaries:
//   I, Q samples    13-bit two's complement, value = code / 2^12
//   |I|, |Q|        12-bit unsigned, value = code / 2^12 (|-1| saturates)
//   theta, alpha,
//   phi             15-bit unsigned angle, value = code * 2*pi / 2^15
//   a1, a2          2-bit supply code, 0..3 = V1..V4
//   f(phi)          10-bit unsigned, value = code / 2^10, saturating at 1
//
// Lint note: when this package is checked on its own, the constants that
// only other files use are reported unused.
package scs_pkg;

  typedef enum logic [3:0] {
    CFG_RECIP   = 4'd0,   // 1/x LUT (getTheta)
    CFG_ATAN    = 4'd1,   // arctan LUT (getTheta)
    CFG_SQRT    = 4'd2,   // sqrt LUT (getAlpha)
    CFG_ISQRT   = 4'd3,   // 1/sqrt LUT (getAlpha)
    CFG_ACOS    = 4'd4,   // arccos LUT (getAlpha, both paths)
    CFG_FTAN    = 4'd5,   // 1/(1+tan) LUT (getPhi, both paths)
    CFG_THRESH  = 4'd6,   // supply thresholds th1..th7, addr 0..6
    CFG_C1      = 4'd7,   // c1 = 1/(2 a_i), addr = 2*pair + path
    CFG_C2      = 4'd8,   // c2 = (a_i^2 - a_j^2)/(2 a_i), addr = 2*pair + path
    CFG_PREDIST = 4'd9,   // symbol predistorter, addr 0..1023, data {I12,Q12}
    CFG_COEF    = 4'd10,  // shaping filter taps, addr = phase*NTAP + tap
    CFG_SIN     = 4'd11,  // quarter-wave sine LUT (dI,dQ to dphi conversion)
    CFG_INVA    = 4'd12,  // 2^15/(2*pi*V) per supply code, addr 0..3
    CFG_FIR     = 4'd13,  // brickwall FIR taps, addr 0..NTAPS-1
    CFG_SFIR    = 4'd14,  // short complex FIR taps, re at 2k, im at 2k+1
    CFG_NL      = 4'd15   // compensator nonlinear functions, see comp_nonlinear
  } cfg_target_e;

  typedef struct packed {
    logic        we;
    cfg_target_e sel;
    logic [9:0]  addr;
    logic [31:0] data;
  } cfg_wr_t;

  // Widths at the block boundaries, as in the source design's SCS block diagram.
  localparam int unsigned IQ_W    = 13;
  localparam int unsigned MAG_W   = 12;
  localparam int unsigned ANG_W   = 15;
  localparam int unsigned FPHI_W  = 10;
  localparam int unsigned SUP_W   = 2;

  // Piece-wise-linear units: all use 2^7-entry LUTs.
  localparam int unsigned PWL_M1  = 7;

  // Fixed-point formats of the arccos argument path in getAlpha.
  localparam int unsigned A2_W    = 26;  // A^2, value = code / 2^24
  localparam int unsigned CONST_W = 20;  // c1, c2: signed, value = code / 2^14
  localparam int unsigned THR_W   = 26;  // thresholds, same scale as A^2

  // Latencies (clock cycles) of the source design's SCS block diagram.
  localparam int unsigned THETA_LAT = 8;
  localparam int unsigned ALPHA_LAT = 15;
  localparam int unsigned PHI_LAT   = 4;
  // |I|,|Q| leave getTheta after its first (divPrep) stage.
  localparam int unsigned MAG_LAT   = 1;
  localparam int unsigned SCS_LAT   = MAG_LAT + ALPHA_LAT + PHI_LAT;

  // Outputs of one SCS copy for one sample.
  typedef struct packed {
    logic [FPHI_W-1:0] fphi1;   // 1/(1+tan(phi1')), phi1' = phi1 folded to quadrant 0
    logic [FPHI_W-1:0] fphi2;
    logic [1:0]        quad1;   // quadrant of phi1
    logic [1:0]        quad2;
    logic [SUP_W-1:0]  a1;      // supply code of PA 1 (0..3 = V1..V4)
    logic [SUP_W-1:0]  a2;
    logic              over;    // amplitude beyond the largest supply pair
  } scs_out_t;

endpackage
