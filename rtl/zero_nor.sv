// zero_nor: the NOR gate of the low power TPG.
//
// zero = NOR of all M counter bits: 1 exactly when the counter holds the
// all-zero pattern. In the TPG it lets the seed generator take its next
// step, which replaces a full decoder. Purely combinational.
module zero_nor #(
  parameter int unsigned M = 4
) (
  input  logic [M-1:0] k,
  output logic         zero
);

  assign zero = ~(|k);

endmodule
