// tb_prbs_gen: self-checking test of the PRBS symbol source.
//
// Keeps a bit-serial model of the PRBS-15 sequence (x^15 + x^14 + 1, seed
// all ones). Each symbol must be the next six bits of the sequence, the
// older three bits as I and the newer three as Q. The test advances
// the generator on random cycles. It checks that the symbol holds while adv
// is low and changes one edge after adv. The run covers more than one full
// period: the sequence first returns to the seed after exactly 2^15 - 1
// advances, and the symbols must keep matching across the wrap.
`timescale 1ns/1ps
module tb_prbs_gen;
  logic clk = 0;
  always #1 clk = ~clk;
  logic rst_n, adv;
  logic [2:0] sym_i, sym_q;

  prbs_gen dut (.clk, .rst_n, .adv, .sym_i, .sym_q);

  int checks = 0, failures = 0;
  bit seq [$];               // model bit stream, oldest first
  logic [14:0] m;            // model register

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // next model bit
  function automatic bit step();
    bit b = m[14] ^ m[13];
    m = {m[13:0], b};
    return b;
  endfunction

  initial begin
    automatic int adv_n = 0, first_repeat = -1;
    automatic logic [5:0] want;
    rst_n = 0; adv = 0;
    m = 15'h7fff;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // after reset the symbol is the seed's low six bits
    checks++;
    if ({sym_i, sym_q} != 6'h3f) begin failures++; $display("reset symbol %h", {sym_i, sym_q}); end
    while (adv_n < 32767 + 10) begin
      adv = (adv_n > 100) || ($urandom_range(0, 2) != 0);
      if (adv) begin
        want = '0;
        for (int k = 0; k < 6; k++) want = {want[4:0], step()};
        adv_n++;
      end else begin
        want = {sym_i, sym_q};
      end
      @(negedge clk);
      checks++;
      if ({sym_i, sym_q} != want) begin
        failures++;
        if (failures < 10) $display("symbol %0d: got %h want %h", adv_n, {sym_i, sym_q}, want);
      end
      if (adv && m == 15'h7fff && first_repeat < 0) first_repeat = adv_n;
    end
    adv = 0;
    checks++;
    if (first_repeat != 32767) begin
      failures++;
      $display("period: state returned to the seed after %0d advances", first_repeat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
