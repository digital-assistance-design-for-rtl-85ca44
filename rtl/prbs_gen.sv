// prbs_gen: on-chip pseudo-random 64-QAM symbol source.
//
// A 15-bit Fibonacci LFSR with the polynomial x^15 + x^14 + 1 (PRBS-15)
// advances by six bit steps each time a symbol is taken (adv = 1). Each step
// shifts the register left and feeds in s[14] ^ s[13]. The six newest bits
// form the symbol: sym_i = s[5:3] and sym_q = s[2:0], so that every symbol
// uses fresh bits. Because gcd(6, 2^15 - 1) = 1, the register still visits
// all 2^15 - 1 non-zero states before it repeats.
//
// Timing: the symbol is a register output and changes on the clock edge
// after adv. Synchronous reset loads the seed 0x7FFF.
//
// The baseband offers symbols either from outside or from an on-chip PRBS.
// The polynomial, the six steps per symbol, the bit-to-level mapping and the
// seed are this design's choices.
module prbs_gen (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       adv,
  output logic [2:0] sym_i,
  output logic [2:0] sym_q
);
  localparam logic [14:0] SEED = 15'h7fff;

  logic [14:0] s, s_next;

  always_comb begin
    s_next = s;
    for (int k = 0; k < 6; k++)
      s_next = {s_next[13:0], s_next[14] ^ s_next[13]};
  end

  always_ff @(posedge clk)
    if (!rst_n)   s <= SEED;
    else if (adv) s <= s_next;

  assign sym_i = s[5:3];
  assign sym_q = s[2:0];

endmodule
