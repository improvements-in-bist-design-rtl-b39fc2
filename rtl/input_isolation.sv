// input_isolation: input isolation circuitry of the BIST.
//
// A 2:1 multiplexer per CUT input: in normal mode (test_mode = 0) the CUT
// sees the system inputs, in test mode it sees the TPG's patterns.
// Combinational, no clock.
//
// From the design: its place between the system inputs, the TPG and the
// CUT, and its job of selecting between normal and test mode. This design's
// own choice: a plain multiplexer driven by the test controller's
// test_mode signal.
module input_isolation #(
  parameter int unsigned W = 4
) (
  input  logic         test_mode,
  input  logic [W-1:0] sys_in,
  input  logic [W-1:0] tpg_in,
  output logic [W-1:0] cut_in
);

  assign cut_in = test_mode ? tpg_in : sys_in;

endmodule
