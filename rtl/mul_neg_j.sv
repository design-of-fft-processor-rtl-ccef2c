// mul_neg_j - multiplication of a complex number by -j.
//
// (A + Bj) * (-j) = B - Aj: the real and imaginary parts are swapped and the
// new imaginary part is negated, so the only arithmetic is one negation.
// Combinational, W bits in and out. The caller keeps one guard bit free (the
// SDF stage in front adds one), so the most negative value, whose negation
// would overflow, never arrives. The real output is the imaginary input
// wired straight through; synthesis reports it as such.
module mul_neg_j #(
  parameter int W = 20
) (
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);
  always_comb begin
    out_re = in_im;
    out_im = -in_re;
  end
endmodule
