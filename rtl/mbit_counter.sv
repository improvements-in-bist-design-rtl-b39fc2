// mbit_counter: the m-bit binary counter of the low power TPG.
//
// k counts up by one on each rising clock edge on which `en` is high and
// wraps from 2^M - 1 to 0, so it walks through all 2^M values. `clr` loads
// RESET_VAL synchronously and has priority over `en`; rst_n loads it
// asynchronously.
//
// From the design: an M-bit counter on the TPG's common clock whose output
// feeds the Gray code generator and the all-zero NOR. This design's own
// choices: the enable, the synchronous clear and the reset value. The TPG
// resets it to 1 so that its first seed lasts a full 2^M patterns (see
// lp_tpg).
module mbit_counter #(
  parameter int unsigned  M         = 4,
  parameter logic [M-1:0] RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  output logic [M-1:0] k
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    k <= RESET_VAL;
    else if (clr)  k <= RESET_VAL;
    else if (en)   k <= k + M'(1);
  end

endmodule
