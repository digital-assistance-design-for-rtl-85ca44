// tb_amp_select: self-checking test of the supply-pair selection.
//
// Programs the seven thresholds for supply levels 0.18/0.36/0.54/0.72 and
// applies A^2 values on, just below and just above every threshold, plus
// random values. One cycle later it checks the region index and the codes a1,
// a2 against the pair table, and `over` against th7. It also checks that
// moving from one region to the next changes exactly one supply by one level.
`timescale 1ns/1ps
module tb_amp_select;
  import scs_pkg::*;
  import scs_tb_pkg::*;

  logic clk = 0;
  always #1 clk = ~clk;
  cfg_wr_t cfg;
  logic [25:0] a2_in;
  logic [2:0]  sel;
  logic [1:0]  a1, a2;
  logic        over;

  amp_select dut (.clk, .cfg, .a2_in, .sel, .a1, .a2, .over);

  int checks = 0, failures = 0;
  localparam int N = 2000;
  longint v [N];
  // pair table written out: region -> (a1, a2)
  int pa1 [7] = '{0, 0, 1, 1, 2, 2, 3};
  int pa2 [7] = '{0, 1, 1, 2, 2, 3, 3};

  initial begin
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0; a2_in = '0;
    for (int k = 0; k < 7; k++) begin
      @(negedge clk); cfg.we = 1; cfg.sel = CFG_THRESH; cfg.addr = 10'(k); cfg.data = 32'(thresh(k));
    end
    @(negedge clk) cfg.we = 0;
    for (int n = 0; n < N; n++) begin
      if (n < 21) v[n] = thresh(n / 3) + longint'(n) % 3 - 1;
      else v[n] = longint'($urandom_range(0, 33554431));
    end
    for (int k = 0; k < 6; k++) begin
      checks++;
      if ((pa1[k+1] - pa1[k]) + (pa2[k+1] - pa2[k]) != 1) failures++;
    end
    for (int n = 0; n < N; n++) begin
      a2_in = 26'(v[n]);
      @(posedge clk); #0.1;
      begin
        automatic int s = 0;
        for (int k = 0; k < 6; k++) if (v[n] > thresh(k)) s = k + 1;
        checks++;
        if (sel != 3'(s) || a1 != 2'(pa1[s]) || a2 != 2'(pa2[s]) || over != (v[n] > thresh(6))) begin
          failures++;
          if (failures < 10) $display("A2=%0d got sel %0d a %0d %0d over %0d, exp sel %0d", v[n], sel, a1, a2, over, s);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
