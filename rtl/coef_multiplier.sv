// coef_multiplier -- signed sample x coefficient product.
//
// One of these sits behind every lambda register of the predict module and
// in front of every adder of the update module.  The product is purely
// combinational and kept at full width (A_W + B_W bits) so that the scaling
// shift that follows loses nothing before it is applied.  A_W = 16 and
// B_W = 18 correspond to the sample and coefficient formats of dwt_pkg.
module coef_multiplier #(
  parameter int A_W = 16,
  parameter int B_W = 18
) (
  input  logic signed [A_W-1:0]     a,
  input  logic signed [B_W-1:0]     b,
  output logic signed [A_W+B_W-1:0] p
);
  always_comb p = a * b;
endmodule
