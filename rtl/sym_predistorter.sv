// sym_predistorter: symbol-space predistortion table with one-symbol memory.
//
// A 64-QAM symbol arrives as 3-bit I and Q level indices (0..7). The table
// maps it to a 12-bit I and a 12-bit Q symbol value (signed, value/2^11), so
// that the symbol constellation can be pre-warped before pulse shaping. The
// table has 2^10 entries of 24 bits, as in the source design; its address is
//     {prev_i[2:1], prev_q[2:1], sym_i, sym_q}
// i.e. the current symbol plus the two MSBs of the previous I and Q levels, to
// give the predistorter some memory. (The source design states the size and
// that the table has memory, not how the address is formed: this split is
// this design's choice.)
//
// Timing: the look-up is combinational from the register-based table; the
// memory of the previous symbol advances on `accept` (symbol taken by the
// downstream filter). Reset clears the memory. The table is written through
// cfg target CFG_PREDIST, address 0..1023, data {I[11:0], Q[11:0]}.
module sym_predistorter
  import scs_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  cfg_wr_t     cfg,
  input  logic [2:0]  sym_i,
  input  logic [2:0]  sym_q,
  input  logic        accept,
  output logic [11:0] pd_i,
  output logic [11:0] pd_q
);
  logic [23:0] tab [1024];
  logic [1:0]  prev_i, prev_q;

  always_ff @(posedge clk)
    if (cfg.we && cfg.sel == CFG_PREDIST)
      tab[cfg.addr] <= cfg.data[23:0];

  always_ff @(posedge clk)
    if (!rst_n) begin
      prev_i <= '0;
      prev_q <= '0;
    end else if (accept) begin
      prev_i <= sym_i[2:1];
      prev_q <= sym_q[2:1];
    end

  assign {pd_i, pd_q} = tab[{prev_i, prev_q, sym_i, sym_q}];

endmodule
