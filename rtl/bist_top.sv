// bist_top: built-in self-test wrapper with a low power test pattern
// generator.
//
// The circuit under test (CUT) sits outside this module: cut_in drives its
// inputs and cut_out returns its outputs. In normal mode the input isolation
// passes sys_in to the CUT. A high bist_start makes the test controller
// restart the TPG and clear the ORA, then apply NUM_PATTERNS patterns from
// the low power TPG, one per clock, while the ORA compacts the CUT's
// responses (sampled at the clock edge that ends each pattern) into a
// signature. When the run ends, bist_done rises and pass is 1 if the
// signature equals golden_sig. The CUT's response to a pattern must settle
// within one clock cycle (a combinational CUT, or one whose outputs are
// sampled by the caller's timing).
//
// From the design: the four blocks (TPG, input isolation, test controller,
// ORA) and their connections around the CUT, and the TPG built from a
// counter, a Gray code generator, a NOR gate and the proposed seed
// generator. This design's own choices: the widths (the CUT is assumed to
// have M = 4 inputs, as many as the seed generator has stages, and
// OUT_W = 4 outputs), the run length of one full TPG pass, the MISR and
// the golden signature as an input port.
module bist_top
  import bist_pkg::*;
#(
  parameter int unsigned      M            = 4,
  parameter int unsigned      OUT_W        = 4,
  parameter int unsigned      NUM_PATTERNS = tpg_period(M),
  parameter logic [M-1:0]     FB_TAPS      = M'(4'b1100),
  parameter logic [M-1:0]     SEED_INIT    = M'(4'b0001),
  parameter logic [OUT_W-1:0] MISR_POLY    = OUT_W'(4'b0011)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bist_start,
  input  logic [OUT_W-1:0] golden_sig,
  input  logic [M-1:0]     sys_in,
  output logic [M-1:0]     cut_in,
  input  logic [OUT_W-1:0] cut_out,
  output logic             test_mode,
  output logic             bist_done,
  output logic             pass,
  output logic [OUT_W-1:0] signature
);

  logic         init, tpg_en, ora_en, match;
  logic [M-1:0] x;

  test_controller #(.NUM_PATTERNS(NUM_PATTERNS)) u_tcl (
    .clk, .rst_n, .bist_start, .init, .test_mode, .tpg_en, .ora_en, .bist_done
  );

  lp_tpg #(.M(M), .FB_TAPS(FB_TAPS), .SEED_INIT(SEED_INIT)) u_tpg (
    .clk, .rst_n, .init, .en(tpg_en), .x, .f(), .g(), .k(), .seed_adv()
  );

  input_isolation #(.W(M)) u_iso (
    .test_mode, .sys_in, .tpg_in(x), .cut_in
  );

  ora #(.W(OUT_W), .POLY(MISR_POLY)) u_ora (
    .clk, .rst_n, .init, .en(ora_en), .resp(cut_out), .golden(golden_sig),
    .sig(signature), .match
  );

  assign pass = bist_done & match;

endmodule
