// amo_scs: signal component separator (SCS) of an asymmetric multilevel
// outphasing (AMO) transmitter.
//
// Each Cartesian sample (I,Q) is split into two constant-envelope phase
// signals driven at two selectable supply levels a1, a2 so that
//     a1 * exp(j*phi1) + a2 * exp(j*phi2) = I + jQ .
// The chain (all in fixed point, one sample per clock):
//   get_theta  theta = atan2(Q,I); |I|,|Q| after 1 cycle, theta after 8
//   get_alpha  A^2, supply pair (a1,a2), alpha1/alpha2 by the law of cosines;
//              15 cycles from |I|,|Q|
//   get_phi    phi1 = theta - alpha1, phi2 = theta + alpha2, quadrant fold and
//              f(phi) = 1/(1+tan(phi)) for the phase modulator; 4 cycles
// theta waits 8 cycles and a1/a2 wait 4 cycles in latency-matching registers
// (the stage counts of the source design), so all outputs of a sample appear
// together SCS_LAT = 1 + 15 + 4 = 20 cycles after it entered. in_valid is
// carried along as out_valid; `over` flags a sample whose amplitude exceeds
// the largest supply pair.
//
// All tables (six PWL LUTs, thresholds, c1/c2) are written through cfg; see
// scs_pkg for the register map. Which stage |I|,|Q| leave get_theta from is
// inferred from the printed latencies; the valid/over flags are this design's.
module amo_scs
  import scs_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  cfg_wr_t           cfg,
  input  logic              in_valid,
  input  logic [IQ_W-1:0]   i_in,
  input  logic [IQ_W-1:0]   q_in,
  output logic              out_valid,
  output logic [FPHI_W-1:0] fphi1,
  output logic [FPHI_W-1:0] fphi2,
  output logic [1:0]        quad1,
  output logic [1:0]        quad2,
  output logic [SUP_W-1:0]  a1,
  output logic [SUP_W-1:0]  a2,
  output logic              over
);
  logic [MAG_W-1:0] abs_i, abs_q;
  logic [ANG_W-1:0] theta, theta_d, alpha1, alpha2;
  logic [SUP_W-1:0] a1_g, a2_g;
  logic             over_g;

  get_theta u_theta (.clk, .cfg, .i_in, .q_in, .abs_i, .abs_q, .theta);

  get_alpha u_alpha (.clk, .cfg, .abs_i, .abs_q, .alpha1, .alpha2,
                     .a1(a1_g), .a2(a2_g), .over(over_g));

  pipe_delay #(.W(ANG_W), .DEPTH(MAG_LAT + ALPHA_LAT - THETA_LAT)) u_theta_dl (
    .clk, .rst_n, .d(theta), .q(theta_d));

  get_phi u_phi (.clk, .cfg, .theta(theta_d), .alpha1, .alpha2,
                 .fphi1, .fphi2, .quad1, .quad2);

  pipe_delay #(.W(2 * SUP_W + 1), .DEPTH(PHI_LAT)) u_sup_dl (
    .clk, .rst_n, .d({over_g, a1_g, a2_g}), .q({over, a1, a2}));

  pipe_delay #(.W(1), .DEPTH(SCS_LAT), .RESET(1'b1)) u_valid_dl (
    .clk, .rst_n, .d(in_valid), .q(out_valid));

endmodule
