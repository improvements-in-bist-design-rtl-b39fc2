// ora: output response analyser of the BIST.
//
// A W-bit multiple-input signature register (MISR) compacts the CUT
// response of every test cycle (ora_en high) into a signature:
//     sig <= {sig[W-2:0], 1'b0} ^ (sig[W-1] ? POLY : 0) ^ resp
// `init` clears it synchronously. A comparator checks the signature against
// the golden signature: match = (sig == golden). The top reads match once
// the test controller reports done.
//
// From the design: the ORA compares the CUT's outputs with golden signature
// responses and says whether the CUT passes or fails. This design's own
// choices: compaction by a MISR, its feedback polynomial (default
// x^4 + x + 1 for W = 4), and the golden signature given as an input.
module ora #(
  parameter int unsigned  W    = 4,
  parameter logic [W-1:0] POLY = W'(4'b0011)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic         en,
  input  logic [W-1:0] resp,
  input  logic [W-1:0] golden,
  output logic [W-1:0] sig,
  output logic         match
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sig <= '0;
    else if (init)  sig <= '0;
    else if (en)    sig <= {sig[W-2:0], 1'b0} ^ (sig[W-1] ? POLY : '0) ^ resp;
  end

  assign match = (sig == golden);

endmodule
