// baseband_top: digital baseband of an asymmetric multilevel outphasing (AMO)
// transmitter.
//
// Data path (one 64-QAM symbol in, two SCS output samples per clock out):
//   sym_predistorter  3-bit I/Q symbol indices -> 12-bit I/Q symbols
//                     (programmable 2^10 x 24 table with one-symbol memory)
//   shaping_filter    oversampling (2 or 4) pulse-shaping FIR that emits an
//                     even and an odd 13-bit sample every clock
//   amo_scs x 2       one signal component separator per interleaved sample
//                     stream: supply codes a1/a2, quadrants and
//                     f(phi) = 1/(1+tan(phi)) of both outphasing paths
// Symbols come from the sym_* ports or, with prbs_sel = 1, from the on-chip
// PRBS generator (prbs_gen), which always offers a symbol and ignores
// sym_valid, sym_i and sym_q. sym_ready shows when a symbol is taken: with
// osr4 = 0 every clock, with osr4 = 1 every second clock. A symbol accepted at
// clock edge k gives its phase 0/1 samples at edge k+2 and its SCS outputs at
// edge k+22 (out_valid), scs_out[0] from the even and scs_out[1] from the odd
// sample.
//
// All programmable state (predistorter table, filter taps, PWL LUTs,
// supply thresholds and arccos constants) is written through the single
// configuration port cfg; both SCS copies receive the same writes. Running
// the two copies on the same clock edge is this design's form of the even/odd
// interleaving (the source design produces the two samples on opposite clock
// edges).
//
// Beside this chain, with its own comp_* ports, sits iq2phi: the block of the
// compensated version of the baseband that turns a Cartesian correction
// (dI, dQ) into phase corrections of the two paths (latency 9). The full
// compensator that would compute dI, dQ is not part of this design, so the
// converter's inputs are brought out as ports rather than driven from the
// SCS outputs. It shares the config port (its 1/x table is CFG_RECIP,
// like getTheta's). The same holds for brickwall_fir (fir_* ports), the
// 100-tap decimating low-pass that the compensator's correction filters
// share, for comp_short_fir (sfir_* ports), one of the complex short
// filters that would feed it, and for comp_nonlinear (nl_* ports), the
// nonlinear functions of one path that come first. How their results are
// combined into the brickwall inputs is not part of this design, so these
// blocks stand apart.
module baseband_top
  import scs_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  cfg_wr_t  cfg,
  input  logic     osr4,
  input  logic     prbs_sel,
  input  logic     sym_valid,
  output logic     sym_ready,
  input  logic [2:0] sym_i,
  input  logic [2:0] sym_q,
  output logic     out_valid,
  output scs_out_t scs_out [2],
  // phase-correction converter of the compensated baseband (own ports)
  input  logic             comp_valid,
  input  logic [ANG_W-1:0] comp_phi1,
  input  logic [ANG_W-1:0] comp_phi2,
  input  logic [SUP_W-1:0] comp_a1,
  input  logic [SUP_W-1:0] comp_a2,
  input  logic [15:0]      comp_di,
  input  logic [15:0]      comp_dq,
  output logic             comp_out_valid,
  output logic [ANG_W-1:0] comp_dphi1,
  output logic [ANG_W-1:0] comp_dphi2,
  output logic             comp_sing,
  // long-tap brickwall filter of the compensated baseband (own ports)
  input  logic             fir_valid,
  input  logic [15:0]      fir_x_even,
  input  logic [15:0]      fir_x_odd,
  output logic             fir_out_valid,
  output logic [15:0]      fir_y,
  // complex short-tap filter of the compensated baseband (own ports)
  input  logic             sfir_valid,
  input  logic [15:0]      sfir_x_even_re,
  input  logic [15:0]      sfir_x_even_im,
  input  logic [15:0]      sfir_x_odd_re,
  input  logic [15:0]      sfir_x_odd_im,
  output logic             sfir_out_valid,
  output logic [15:0]      sfir_y_even_re,
  output logic [15:0]      sfir_y_even_im,
  output logic [15:0]      sfir_y_odd_re,
  output logic [15:0]      sfir_y_odd_im,
  // nonlinear transformation of the compensator, one path (own ports)
  input  logic             nl_valid,
  input  logic [ANG_W-1:0] nl_phi,
  input  logic [15:0]      nl_amp,
  output logic             nl_out_valid,
  output logic signed [15:0] nl_y_re [2],
  output logic signed [15:0] nl_y_im [2]
);
  logic [11:0]     pd_i, pd_q;
  logic            f_valid;
  logic [IQ_W-1:0] si [2], sq [2];
  logic            v [2];

  // symbol source: external port or on-chip PRBS (always valid)
  logic [2:0] gen_i, gen_q, src_i, src_q;
  logic       src_valid, accept;

  assign src_valid = prbs_sel ? 1'b1  : sym_valid;
  assign src_i     = prbs_sel ? gen_i : sym_i;
  assign src_q     = prbs_sel ? gen_q : sym_q;
  assign accept    = src_valid && sym_ready;

  prbs_gen u_prbs (.clk, .rst_n, .adv(prbs_sel && sym_ready), .sym_i(gen_i), .sym_q(gen_q));

  sym_predistorter u_pd (.clk, .rst_n, .cfg, .sym_i(src_i), .sym_q(src_q),
                         .accept, .pd_i, .pd_q);

  shaping_filter u_filt (.clk, .rst_n, .cfg, .osr4,
                         .in_valid(src_valid), .in_ready(sym_ready),
                         .in_i(pd_i), .in_q(pd_q),
                         .out_valid(f_valid),
                         .out_i0(si[0]), .out_q0(sq[0]), .out_i1(si[1]), .out_q1(sq[1]));

  for (genvar c = 0; c < 2; c++) begin : g_scs
    amo_scs u_scs (.clk, .rst_n, .cfg, .in_valid(f_valid), .i_in(si[c]), .q_in(sq[c]),
                   .out_valid(v[c]),
                   .fphi1(scs_out[c].fphi1), .fphi2(scs_out[c].fphi2),
                   .quad1(scs_out[c].quad1), .quad2(scs_out[c].quad2),
                   .a1(scs_out[c].a1), .a2(scs_out[c].a2), .over(scs_out[c].over));
  end

  assign out_valid = v[0];

  iq2phi u_iq2phi (.clk, .rst_n, .cfg, .in_valid(comp_valid),
                   .phi1(comp_phi1), .phi2(comp_phi2), .a1(comp_a1), .a2(comp_a2),
                   .d_i(comp_di), .d_q(comp_dq), .out_valid(comp_out_valid),
                   .dphi1(comp_dphi1), .dphi2(comp_dphi2), .sing(comp_sing));

  brickwall_fir u_fir (.clk, .rst_n, .cfg, .in_valid(fir_valid),
                       .x_even(fir_x_even), .x_odd(fir_x_odd),
                       .out_valid(fir_out_valid), .y(fir_y));

  comp_short_fir u_sfir (.clk, .rst_n, .cfg, .in_valid(sfir_valid),
                         .x_even_re(sfir_x_even_re), .x_even_im(sfir_x_even_im),
                         .x_odd_re(sfir_x_odd_re), .x_odd_im(sfir_x_odd_im),
                         .out_valid(sfir_out_valid),
                         .y_even_re(sfir_y_even_re), .y_even_im(sfir_y_even_im),
                         .y_odd_re(sfir_y_odd_re), .y_odd_im(sfir_y_odd_im));

  comp_nonlinear u_nl (.clk, .rst_n, .cfg, .in_valid(nl_valid), .phi(nl_phi), .amp(nl_amp),
                       .out_valid(nl_out_valid), .y_re(nl_y_re), .y_im(nl_y_im));

endmodule
