// pipe_delay: latency-matching register chain.
//
// Delays a W-bit bundle by DEPTH clock cycles (DEPTH >= 1) with plain
// registers. Used where a value must wait for a deeper parallel computation,
// e.g. theta waiting for getAlpha and the supply codes waiting for getPhi.
// An optional synchronous reset clears the chain (used for valid flags).
module pipe_delay #(
  parameter int unsigned W     = 1,
  parameter int unsigned DEPTH = 1,
  parameter bit          RESET = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] r [DEPTH];

  always_ff @(posedge clk) begin
    r[0] <= d;
    for (int k = 1; k < DEPTH; k++) r[k] <= r[k-1];
    if (RESET && !rst_n)
      for (int k = 0; k < DEPTH; k++) r[k] <= '0;
  end

  assign q = r[DEPTH-1];

endmodule
