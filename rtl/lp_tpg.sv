// lp_tpg: low power test pattern generator.
//
// An M-bit counter k and a Gray code generator g run on the common clock.
// A NOR gate detects the counter's all-zero state; only on that clock edge
// does the seed generator take its next step, so each seed is held for 2^M
// patterns. The output pattern is the bitwise XOR of the seed f and the Gray
// code g:  x = f ^ g. Within one seed, successive patterns therefore differ
// in exactly one bit; only at a seed change can more bits toggle.
//
// Timing: `init` (synchronous) or rst_n (asynchronous) put the TPG at the
// start of its sequence; x is then pattern 0 and every clock edge with `en`
// high moves to the next pattern. Pattern p is
//     x_p = f(s_(p / 2^M)) ^ gray(p mod 2^M)
// where s_j is the j-th state of the seed register (s_0 = SEED_INIT) and f
// is its multiplexer function (see seed_gen). One full pass is
// (2^M - 1) * 2^M patterns with the default feedback.
//
// From the design: the counter, Gray code generator, NOR gate, seed
// generator and output XOR, their connection, and the seed step taken when
// the counter is all zero. The design gates the seed generator's clock with
// the NOR output; here the same condition is a clock enable, so that the
// whole TPG runs on one ungated clock. This design's own choices: `en` and
// `init`, the counter's reset value of 1 and the clocked Gray register,
// which together make pattern 0 of every seed carry the Gray code 0.
module lp_tpg #(
  parameter int unsigned  M         = 4,
  parameter logic [M-1:0] FB_TAPS   = M'(4'b1100),
  parameter logic [M-1:0] SEED_INIT = M'(4'b0001)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,      // restart the pattern sequence
  input  logic         en,        // advance one pattern per clock
  output logic [M-1:0] x,         // test pattern
  output logic [M-1:0] f,         // current seed (seed generator output)
  output logic [M-1:0] g,         // current Gray code
  output logic [M-1:0] k,         // counter value
  output logic         seed_adv   // the seed changes at this clock edge
);

  logic zero;

  mbit_counter #(.M(M), .RESET_VAL(M'(1))) u_counter (
    .clk, .rst_n, .clr(init), .en, .k
  );

  zero_nor #(.M(M)) u_nor (.k, .zero);

  gray_gen #(.M(M)) u_gray (
    .clk, .rst_n, .clr(init), .en, .k, .g
  );

  assign seed_adv = en & zero & ~init;

  seed_gen #(.N(M), .FB_TAPS(FB_TAPS), .SEED_INIT(SEED_INIT)) u_seed (
    .clk, .rst_n, .init, .adv(seed_adv), .state(), .seed(f)
  );

  assign x = f ^ g;

endmodule
