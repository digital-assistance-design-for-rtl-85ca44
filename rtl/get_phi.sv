// get_phi: outphasing angles and the phase-modulator input function.
//
// ftanPrep (stage 1) forms the two outphasing angles
//     phi1 = theta - alpha1,   phi2 = theta + alpha2   (modulo 2*pi)
// and folds each into the first quadrant: the two MSBs of the 15-bit angle are
// the quadrant flag quad (0..3), the 13 LSBs the angle phi' in [0, pi/2).
// Stages 2-3 evaluate f(phi') = 1/(1 + tan(phi')) with a PWL unit whose LUT is
// programmable (it can also absorb a static nonlinearity of the phase
// modulator). Stage 4 registers the outputs. Latency 4 cycles, one sample per
// clock, as in the source design.
//
// Formats: angles 15 bits (2^15 = 2*pi); fphi 10 bits, value/2^10, with
// f(0) = 1 saturated to 1023. The sign convention (phi1 = theta - alpha1)
// follows the getPhi description of the source design; its equation table
// writes the mirror image (theta + alpha1, theta - alpha2), which gives the
// same transmitted vector with the two paths' roles exchanged.
module get_phi
  import scs_pkg::*;
(
  input  logic              clk,
  input  cfg_wr_t           cfg,
  input  logic [ANG_W-1:0]  theta,
  input  logic [ANG_W-1:0]  alpha1,
  input  logic [ANG_W-1:0]  alpha2,
  output logic [FPHI_W-1:0] fphi1,
  output logic [FPHI_W-1:0] fphi2,
  output logic [1:0]        quad1,
  output logic [1:0]        quad2
);
  // ---- stage 1: ftanPrep ----
  logic [ANG_W-1:0] phi_1 [2];
  always_ff @(posedge clk) begin
    phi_1[0] <= theta - alpha1;
    phi_1[1] <= theta + alpha2;
  end

  // ---- stages 2-3: 1/(1+tan) ----
  logic [FPHI_W-1:0] f_3 [2];
  for (genvar p = 0; p < 2; p++) begin : g_ftan
    pwl_approx #(.IN_W(ANG_W - 2), .OUT_W(FPHI_W), .K_W(10), .KF(10), .S_W(11), .SF(3),
                 .TARGET(CFG_FTAN)) u_ftan (.clk, .cfg, .x(phi_1[p][ANG_W-3:0]), .y(f_3[p]));
  end

  logic [1:0] q_2 [2], q_3 [2];
  always_ff @(posedge clk) begin
    for (int p = 0; p < 2; p++) begin
      q_2[p] <= phi_1[p][ANG_W-1 -: 2];
      q_3[p] <= q_2[p];
    end
  end

  // ---- stage 4: output register ----
  always_ff @(posedge clk) begin
    fphi1 <= f_3[0];
    fphi2 <= f_3[1];
    quad1 <= q_3[0];
    quad2 <= q_3[1];
  end

endmodule
