// tb_shaping_filter: self-checking test of the interleaved polyphase FIR.
//
// Programs random taps, then offers random symbols with random gaps, first at
// oversampling 2 and then at oversampling 4 (the mode switch). For every
// accepted symbol the testbench computes the expected phase sums itself from
// its own copy of the symbol history, and checks
//   - each output pair (even/odd sample) value, bit exact;
//   - the pair of phases 0/1 appears two clock edges after the accept, and at
//     oversampling 4 the pair 2/3 one edge later;
//   - the symbol rate: with sym_valid held high, one accept per clock at
//     oversampling 2 and one per two clocks at oversampling 4.
`timescale 1ns/1ps
module tb_shaping_filter;
  import scs_pkg::*;

  localparam int NTAP = 8;
  logic clk = 0;
  always #1 clk = ~clk;
  logic rst_n, osr4, in_valid, in_ready, out_valid;
  cfg_wr_t cfg;
  logic [11:0] in_i, in_q;
  logic [12:0] out_i0, out_q0, out_i1, out_q1;

  shaping_filter dut (.clk, .rst_n, .cfg, .osr4, .in_valid, .in_ready, .in_i, .in_q,
                      .out_valid, .out_i0, .out_q0, .out_i1, .out_q1);

  int checks = 0, failures = 0, cyc = 0;
  int c [4][NTAP];
  int hi_hist [$], hq_hist [$];
  int exp_q [$];   // flattened: cycle, i0, q0, i1, q1
  int accepts = 0;

  always @(posedge clk) cyc <= cyc + 1;

  function automatic int fir(ref int h [$], input int ph);
    longint acc = 1 <<< 10;
    for (int t = 0; t < NTAP; t++)
      if (h.size() - 1 - t >= 0) acc += longint'(c[ph][t]) * h[h.size() - 1 - t];
    acc = acc >>> 11;
    if (acc > 4095) acc = 4095;
    if (acc < -4096) acc = -4096;
    return int'(acc);
  endfunction

  function automatic int s13(logic [12:0] v); return int'(signed'(v)); endfunction

  // accept monitor: predict outputs
  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) begin
      accepts++;
      hi_hist.push_back(int'(signed'(in_i)));
      hq_hist.push_back(int'(signed'(in_q)));
      exp_q.push_back(cyc + 2);
      exp_q.push_back(fir(hi_hist, 0)); exp_q.push_back(fir(hq_hist, 0));
      exp_q.push_back(fir(hi_hist, 1)); exp_q.push_back(fir(hq_hist, 1));
      if (osr4) begin
        exp_q.push_back(cyc + 3);
        exp_q.push_back(fir(hi_hist, 2)); exp_q.push_back(fir(hq_hist, 2));
        exp_q.push_back(fir(hi_hist, 3)); exp_q.push_back(fir(hq_hist, 3));
      end
    end
  end

  // output checker
  always @(posedge clk) begin
    #0.1;
    if (rst_n && out_valid) begin
      int t, i0, q0, i1, q1;
      checks++;
      if (exp_q.size() < 5) begin
        failures++; $display("unexpected output at %0d", cyc);
      end else begin
        t = exp_q.pop_front(); i0 = exp_q.pop_front(); q0 = exp_q.pop_front();
        i1 = exp_q.pop_front(); q1 = exp_q.pop_front();
        if (t != cyc || s13(out_i0) != i0 || s13(out_q0) != q0 || s13(out_i1) != i1 || s13(out_q1) != q1) begin
          failures++;
          if (failures < 10) $display("cyc %0d (exp %0d): got %0d %0d %0d %0d exp %0d %0d %0d %0d", cyc, t,
            s13(out_i0), s13(out_q0), s13(out_i1), s13(out_q1), i0, q0, i1, q1);
        end
      end
    end
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int n, bit full_rate);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      in_valid = full_rate ? 1'b1 : ($urandom_range(0, 3) != 0);
      in_i = 12'($urandom); in_q = 12'($urandom);
    end
    @(negedge clk) in_valid = 0;
    repeat (6) @(negedge clk);
  endtask

  initial begin
    int a0;
    rst_n = 0; osr4 = 0; in_valid = 0; in_i = '0; in_q = '0; cfg = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 4; p++)
      for (int t = 0; t < NTAP; t++) begin
        c[p][t] = $urandom_range(0, 16383) - 8192;
        @(negedge clk); cfg.we = 1; cfg.sel = CFG_COEF; cfg.addr = 10'(p * NTAP + t); cfg.data = 32'(c[p][t]);
      end
    @(negedge clk) cfg.we = 0;
    run(500, 0);
    a0 = accepts; run(100, 1);
    checks++; if (accepts - a0 != 100) begin failures++; $display("OSR2 rate: %0d accepts in 100 cycles", accepts - a0); end
    osr4 = 1;
    run(500, 0);
    a0 = accepts; run(100, 1);
    checks++; if (accepts - a0 != 50) begin failures++; $display("OSR4 rate: %0d accepts in 100 cycles", accepts - a0); end
    checks++; if (exp_q.size() != 0) begin failures++; $display("%0d outputs missing", exp_q.size() / 5); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
