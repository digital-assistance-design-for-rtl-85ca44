// shaping_filter: programmable oversampling pulse-shaping FIR, two samples
// per clock.
//
// Symbols (12-bit signed I and Q, value/2^11) enter a NTAP-deep delay line.
// Output sample p (phase p of the oversampling factor OSR) is the polyphase
// sum  y_p = sum_t coef[p][t] * x[n-t], i.e. an interpolating FIR whose
// impulse response is spread over the phases. To reach a sample rate of twice
// the clock, two phases are produced per clock: an even sample (out_*0) and
// an odd sample (out_*1), which feed two copies of the SCS.
//   osr4 = 0 (OSR 2): one symbol per clock, phases 0 and 1 each clock.
//   osr4 = 1 (OSR 4): one symbol every second clock; phases 0,1 in the first
//                     and 2,3 in the second clock after the symbol.
// in_ready is low in the clock where phases 2,3 are still pending, so a new
// symbol is never shifted in before its predecessor's last phases are out.
// Outputs are registered: a symbol accepted at edge k gives phases 0,1 at edge
// k+2 (out_valid high) and, with OSR 4, phases 2,3 at edge k+3.
//
// Coefficients: COEF_W-bit signed, value/2^COEF_F, written through cfg target
// CFG_COEF at address phase*NTAP + tap. Output: 13-bit signed, value/2^12,
// rounded and saturated. The source design gives the oversampling factors,
// the 12-bit samples, the programmable coefficients and the even/odd
// interleaving; the tap count, the coefficient format and the handshake are
// this design's choices.
module shaping_filter
  import scs_pkg::*;
#(
  parameter int unsigned NTAP   = 8,
  parameter int unsigned COEF_W = 14,
  parameter int unsigned COEF_F = 12
) (
  input  logic            clk,
  input  logic            rst_n,
  input  cfg_wr_t         cfg,
  input  logic            osr4,
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [11:0]     in_i,
  input  logic [11:0]     in_q,
  output logic            out_valid,
  output logic [IQ_W-1:0] out_i0,
  output logic [IQ_W-1:0] out_q0,
  output logic [IQ_W-1:0] out_i1,
  output logic [IQ_W-1:0] out_q1
);
  localparam int unsigned ACC_W = 12 + COEF_W + $clog2(NTAP) + 1;
  localparam int unsigned SH    = COEF_F - 1;   // Q.11 * Q.COEF_F -> Q.12
  localparam int unsigned TAP_AW = $clog2(NTAP);

  logic signed [COEF_W-1:0] coef [4][NTAP];
  logic signed [11:0]       wi [NTAP], wq [NTAP];
  logic                     do_lo, do_hi;

  always_ff @(posedge clk)
    if (cfg.we && cfg.sel == CFG_COEF && cfg.addr < 10'(4 * NTAP))
      coef[2'(cfg.addr / 10'(NTAP))][TAP_AW'(cfg.addr % 10'(NTAP))] <= signed'(cfg.data[COEF_W-1:0]);

  assign in_ready = !(osr4 && do_lo);

  // delay line and phase control
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      do_lo <= 1'b0;
      do_hi <= 1'b0;
      for (int t = 0; t < NTAP; t++) begin
        wi[t] <= '0;
        wq[t] <= '0;
      end
    end else begin
      do_lo <= in_valid && in_ready;
      do_hi <= osr4 && do_lo;
      if (in_valid && in_ready) begin
        wi[0] <= signed'(in_i);
        wq[0] <= signed'(in_q);
        for (int t = 1; t < NTAP; t++) begin
          wi[t] <= wi[t-1];
          wq[t] <= wq[t-1];
        end
      end
    end
  end

  function automatic logic [IQ_W-1:0] fir(logic signed [11:0] w [NTAP], logic [1:0] ph,
                                          logic signed [COEF_W-1:0] c [4][NTAP]);
    logic signed [ACC_W-1:0] acc;
    acc = ACC_W'(1) <<< (SH - 1);
    for (int t = 0; t < NTAP; t++)
      acc += ACC_W'(c[ph][t]) * ACC_W'(w[t]);
    acc = acc >>> SH;
    if (acc > ACC_W'(2**(IQ_W-1) - 1))   return IQ_W'(2**(IQ_W-1) - 1);
    if (acc < -ACC_W'(2**(IQ_W-1)))      return IQ_W'(-(2**(IQ_W-1)));
    return acc[IQ_W-1:0];
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= do_lo || do_hi;
    if (do_lo) begin
      out_i0 <= fir(wi, 0, coef);  out_q0 <= fir(wq, 0, coef);
      out_i1 <= fir(wi, 1, coef);  out_q1 <= fir(wq, 1, coef);
    end else if (do_hi) begin
      out_i0 <= fir(wi, 2, coef);  out_q0 <= fir(wq, 2, coef);
      out_i1 <= fir(wi, 3, coef);  out_q1 <= fir(wq, 3, coef);
    end
  end

endmodule
