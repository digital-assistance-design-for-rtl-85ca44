// amp_select: supply-pair selection of the AMO outphasing transmitter.
//
// The squared sample amplitude A^2 = I^2 + Q^2 is compared with seven
// programmable thresholds th1..th7 (normally th = (2V1)^2, (V1+V2)^2, (2V2)^2,
// (V2+V3)^2, (2V3)^2, (V3+V4)^2, (2V4)^2 for supply levels V1 <= .. <= V4).
// The selected region index `sel` (0..6) names the pair
//   sel 0: (V1,V1)  1: (V1,V2)  2: (V2,V2)  3: (V2,V3)
//       4: (V3,V3)  5: (V3,V4)  6: (V4,V4)
// i.e. the smallest pair whose sum still reaches A, so that neighbouring
// amplitude regions differ in one supply by one level. a1 = sel/2 and
// a2 = (sel+1)/2 are the 2-bit supply codes (0..3 = V1..V4) of the two PAs.
// A^2 above th7 cannot be formed by any pair: the pair (V4,V4) is kept and
// `over` is raised.
//
// Timing: one register stage (outputs valid one cycle after a2_in).
// Thresholds are written through the config port (target CFG_THRESH,
// address 0..6 = th1..th7, data[THR_W-1:0], same scale as A^2). The
// comparison rule and the pair table follow the source design; the register
// map and the `over` flag are this design's own.
module amp_select
  import scs_pkg::*;
(
  input  logic             clk,
  input  cfg_wr_t          cfg,
  input  logic [A2_W-1:0]  a2_in,
  output logic [2:0]       sel,
  output logic [SUP_W-1:0] a1,
  output logic [SUP_W-1:0] a2,
  output logic             over
);
  logic [THR_W-1:0] th [7];

  always_ff @(posedge clk)
    if (cfg.we && cfg.sel == CFG_THRESH && cfg.addr < 10'd7)
      th[cfg.addr[2:0]] <= cfg.data[THR_W-1:0];

  always_ff @(posedge clk) begin
    logic [2:0] s;
    s = '0;
    for (int k = 0; k < 6; k++)
      if (a2_in > th[k]) s = 3'(k + 1);
    sel  <= s;
    a1   <= SUP_W'(s >> 1);
    a2   <= SUP_W'((s + 3'd1) >> 1);
    over <= a2_in > th[6];
  end

endmodule
