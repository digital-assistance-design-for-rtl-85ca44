// tb_sym_predistorter: self-checking test of the symbol predistortion table.
//
// Fills the 1024-entry table with a pattern that encodes the address it was
// written to, then applies random symbols, accepting some and holding others,
// and checks that each look-up returns the entry of
// {prev_i[2:1], prev_q[2:1], sym_i, sym_q}, where prev is the last accepted
// symbol (zero after reset). It also checks that a rejected symbol does not
// advance the memory.
`timescale 1ns/1ps
module tb_sym_predistorter;
  import scs_pkg::*;

  logic clk = 0;
  always #1 clk = ~clk;
  logic rst_n, accept;
  cfg_wr_t cfg;
  logic [2:0] sym_i, sym_q;
  logic [11:0] pd_i, pd_q;

  sym_predistorter dut (.clk, .rst_n, .cfg, .sym_i, .sym_q, .accept, .pd_i, .pd_q);

  int checks = 0, failures = 0;
  logic [23:0] tab [1024];
  int pi_ = 0, pq_ = 0;

  initial begin
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; accept = 0; sym_i = 0; sym_q = 0; cfg = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 1024; a++) begin
      tab[a] = {12'(a * 3 + 7), 12'($urandom)};
      @(negedge clk); cfg.we = 1; cfg.sel = CFG_PREDIST; cfg.addr = 10'(a); cfg.data = 32'(tab[a]);
    end
    @(negedge clk) cfg.we = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      sym_i = 3'($urandom); sym_q = 3'($urandom); accept = $urandom_range(0, 2) != 0;
      #0.1;
      checks++;
      if ({pd_i, pd_q} != tab[{2'(pi_ >> 1), 2'(pq_ >> 1), sym_i, sym_q}]) begin
        failures++;
        if (failures < 10) $display("n=%0d got %h", n, {pd_i, pd_q});
      end
      if (accept) begin pi_ = int'(sym_i); pq_ = int'(sym_q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
