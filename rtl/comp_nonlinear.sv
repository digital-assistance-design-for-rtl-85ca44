// comp_nonlinear: nonlinear transformation of the compensator for one PA
// path: two complex functions (one per mode) of the present phase, the
// previous phase and the amplitudes.
//
// The compensator models the PA's error as a nonlinear map with one sample
// of memory, followed by a linear filter. The nonlinear map of one path is
//     F(phi, phi_d, a, a_d) = g(a, a_d) * P(phi, phi_d)
// where phi_d is the previous phase and P is a smooth complex function of
// the two phases. The amplitude factor is linear in the present and previous
// amplitude:
//     g = c0 + c1 * a + c2 * a_d.
// P is approximated in two dimensions by planar pieces. The 2^M x 2^M grid
// cell is picked by the top M bits of phi and phi_d, and the remaining bits
// (dx, dy, as a fraction of the cell) give
//     P = b + kx * dx + ky * dy
// with a complex b, kx, ky per cell. This is the two-dimensional form of the
// piece-wise-linear units of the SCS. Both modes are computed every sample,
// which gives two complex outputs (four real ones) per path.
//
// Pipeline, one sample per clock:
//   edge k    phi, a are taken; cell and offsets registered; phi_d and a_d
//             are the values of the previous valid sample
//   edge k+1  table read, P for both modes; g for both modes
//   edge k+2  y = g * P, rounded and saturated; out_valid
// Latency 3 cycles. phi_d and a_d are 0 after reset.
//
// Formats: phi is a 15-bit angle (2^15 = 2 pi). a is 16-bit unsigned,
// value/2^15. b, kx, ky, c0..c2 and the outputs are 16-bit signed,
// value/2^14; kx and ky are the change over one cell. Tables through cfg
// target CFG_NL, address {mode, cell, part}, cell = {phi cell, phi_d cell}:
//   part 0: b, part 1: kx, part 2: ky, each data = {imag[15:0], real[15:0]}
//   part 3: at cells 0, 1, 2 the coefficients c0, c1, c2 of g (data[15:0])
// With the 10-bit config address this allows M <= 3.
//
// From the source design: the inputs (phases, their one-sample delayed
// versions and the amplitudes), two complex functions for two modes giving
// four real outputs per PA, the approximation by two-dimensional
// piece-wise-linear functions, a linear amplitude factor, and programmable
// parameters. This design's own choices: the planar-patch form, the grid
// size M, all formats, the table layout and the pipeline.
module comp_nonlinear
  import scs_pkg::*;
#(
  parameter int unsigned M = 3
) (
  input  logic               clk,
  input  logic               rst_n,
  input  cfg_wr_t            cfg,
  input  logic               in_valid,
  input  logic [ANG_W-1:0]   phi,
  input  logic [15:0]        amp,
  output logic               out_valid,
  output logic signed [15:0] y_re [2],
  output logic signed [15:0] y_im [2]
);
  localparam int unsigned D_W   = ANG_W - M;          // offset bits inside a cell
  localparam int unsigned NCELL = 1 << (2 * M);
  localparam int unsigned P_W   = (D_W + 19 > 34) ? D_W + 19 : 34;   // g*P needs 33

  // ---- tables ----
  logic [31:0]        tab [2][NCELL][3];
  logic signed [15:0] gc  [2][3];

  always_ff @(posedge clk)
    if (cfg.we && cfg.sel == CFG_NL && cfg.addr < 10'(8 * NCELL)) begin
      if (cfg.addr[1:0] != 2'd3)
        tab[cfg.addr[2*M+2]][cfg.addr[2*M+1:2]][cfg.addr[1:0]] <= cfg.data;
      else if (cfg.addr[2*M+1:2] < 3)
        gc[cfg.addr[2*M+2]][cfg.addr[3:2]] <= cfg.data[15:0];
    end

  // ---- stage 1: cell, offsets, delayed values ----
  logic [ANG_W-1:0]   phd;
  logic [15:0]        ampd;
  logic [2*M-1:0]     cell1;
  logic [D_W-1:0]     dx1, dy1;
  logic [15:0]        amp1, ampd1;
  logic               v1, v2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phd  <= '0;
      ampd <= '0;
    end else if (in_valid) begin
      phd  <= phi;
      ampd <= amp;
    end
    cell1 <= {phi[ANG_W-1 -: M], phd[ANG_W-1 -: M]};
    dx1   <= phi[D_W-1:0];
    dy1   <= phd[D_W-1:0];
    amp1  <= amp;
    ampd1 <= ampd;
    v1    <= rst_n && in_valid;
    v2    <= rst_n && v1;
  end

  function automatic logic signed [15:0] sat16(logic signed [P_W-1:0] v);
    if (v > P_W'(32767))       return 16'sh7fff;
    else if (v < -P_W'(32768)) return -16'sh8000;
    else                       return v[15:0];
  endfunction

  // one planar piece: b + (kx*dx + ky*dy) / 2^D_W, rounded
  function automatic logic signed [15:0] plane(logic signed [15:0] b, logic signed [15:0] kx,
                                               logic signed [15:0] ky,
                                               logic [D_W-1:0] dx, logic [D_W-1:0] dy);
    logic signed [P_W-1:0] s;
    s = P_W'(kx) * P_W'($signed({1'b0, dx})) + P_W'(ky) * P_W'($signed({1'b0, dy}))
        + (P_W'(1) <<< (D_W - 1));
    return sat16(P_W'(b) + (s >>> D_W));
  endfunction

  // ---- stage 2: P for both modes, g for both modes ----
  logic signed [15:0] p_re [2], p_im [2], g2 [2];

  always_ff @(posedge clk)
    for (int md = 0; md < 2; md++) begin
      logic [31:0] wb, wx, wy;
      logic signed [P_W-1:0] gs;
      wb = tab[md][cell1][0];
      wx = tab[md][cell1][1];
      wy = tab[md][cell1][2];
      p_re[md] <= plane(wb[15:0],  wx[15:0],  wy[15:0],  dx1, dy1);
      p_im[md] <= plane(wb[31:16], wx[31:16], wy[31:16], dx1, dy1);
      gs = P_W'(gc[md][1]) * P_W'($signed({1'b0, amp1}))
         + P_W'(gc[md][2]) * P_W'($signed({1'b0, ampd1})) + (P_W'(1) <<< 14);
      g2[md] <= sat16(P_W'(gc[md][0]) + (gs >>> 15));
    end

  // ---- stage 3: y = g * P ----
  always_ff @(posedge clk) begin
    for (int md = 0; md < 2; md++) begin
      y_re[md] <= sat16((P_W'(g2[md]) * P_W'(p_re[md]) + P_W'(1 << 13)) >>> 14);
      y_im[md] <= sat16((P_W'(g2[md]) * P_W'(p_im[md]) + P_W'(1 << 13)) >>> 14);
    end
    out_valid <= rst_n && v2;
  end

endmodule
