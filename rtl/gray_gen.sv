// gray_gen: the Gray code generator of the low power TPG.
//
// On each rising edge with `en` high the register g takes the reflected
// binary Gray code of the counter value, g = k ^ (k >> 1); `clr` (synchronous)
// and rst_n (asynchronous) clear it to zero. Because it is clocked, g shows
// the Gray code of the value the counter held one cycle earlier. Two
// successive g values differ in exactly one bit.
//
// From the design: a Gray code generator fed by the counter and on the same
// clock as it. This design's own choices: the output register (the design
// clocks the generator but does not say what it stores), enable and clear.
module gray_gen
  import bist_pkg::*;
#(
  parameter int unsigned M = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [M-1:0] k,
  output logic [M-1:0] g
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    g <= '0;
    else if (clr)  g <= '0;
    else if (en)   g <= M'(bin2gray(32'(k)));
  end

endmodule
