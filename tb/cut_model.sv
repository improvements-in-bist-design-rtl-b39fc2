// cut_model: a small combinational circuit under test for the BIST
// testbenches (behavioural model, not part of the BIST hardware).
//
// Four inputs a, four outputs y:
//   y[0] = a[0] ^ a[1]
//   y[1] = (a[1] & a[2]) | a[3]
//   y[2] = ~(a[0] | a[3])
//   y[3] = a[0] ^ a[2] ^ a[3]
// When `fault` is high the internal node a[1] & a[2] is stuck at 0, a
// classic stuck-at fault for the BIST to find.
module cut_model (
  input  logic [3:0] a,
  input  logic       fault,
  output logic [3:0] y
);
  logic n12;
  assign n12  = fault ? 1'b0 : (a[1] & a[2]);
  assign y[0] = a[0] ^ a[1];
  assign y[1] = n12 | a[3];
  assign y[2] = ~(a[0] | a[3]);
  assign y[3] = a[0] ^ a[2] ^ a[3];
endmodule
