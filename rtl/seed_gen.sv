// seed_gen: the seed generator of the low power TPG.
//
// N D flip-flops q[0..N-1] form a shift register with a common clock. When
// `adv` is high at a rising edge, every stage takes the value of the stage
// before it and the first stage takes the feedback: the XOR of the stages
// selected by FB_TAPS (default: stages 3 and 4, the primitive polynomial
// x^4 + x^3 + 1, so the register steps through all 15 non-zero states).
// Each seed bit comes from a 2:1 multiplexer between Q and Qbar of its own
// flip-flop, selected by the adjacent flip-flop:
//     seed[i] = q[(i+1) % N] ? ~q[i] : q[i]
// The multiplexers are combinational, so `seed` follows the state in the
// same cycle as it changes.
//
// From the proposed design: the flip-flop register, the Q/Qbar multiplexers
// and their select taken from the adjacent flip-flop, and four stages.
// This design's own choices: the feedback function and taps, the wrap-around
// select of the last multiplexer (taken from the first stage), the advance
// enable `adv` (it carries the counter's all-zero signal of the TPG), the
// synchronous `init` and the reset value SEED_INIT.
//
// Interface: clk, rst_n (asynchronous, active low), init (synchronous load
// of SEED_INIT, has priority over adv), adv (shift one step), state (the
// flip-flop outputs) and seed (the multiplexer outputs).
module seed_gen #(
  parameter int unsigned  N         = 4,
  parameter logic [N-1:0] FB_TAPS   = N'(4'b1100),
  parameter logic [N-1:0] SEED_INIT = N'(4'b0001)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic         adv,
  output logic [N-1:0] state,
  output logic [N-1:0] seed
);

  logic [N-1:0] q;
  logic         fb;

  assign fb = ^(q & FB_TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= SEED_INIT;
    else if (init)   q <= SEED_INIT;
    else if (adv)    q <= {q[N-2:0], fb};
  end

  // Q/Qbar multiplexers, select from the adjacent (next) flip-flop.
  always_comb begin
    for (int i = 0; i < int'(N); i++) begin
      seed[i] = q[(i + 1) % N] ? ~q[i] : q[i];
    end
  end

  assign state = q;

  initial begin
    assert (N > 2) else $error("seed_gen: N must be above 2");
  end

endmodule
