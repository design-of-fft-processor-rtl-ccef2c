// mul_w8 - constant multiplier by W8^1 = (1 - j)/sqrt(2), or by W8^3 when
// sel3 is set.
//
//   (A + Bj) W8^1 = (A/sqrt2 + B/sqrt2) + (B/sqrt2 - A/sqrt2) j
//   (A + Bj) W8^3 = ((A + Bj) W8^1) (-j)
//
// 1/sqrt(2) is the 8-fraction-bit constant 0.10110101b = 181/256, i.e. the
// sum of the operand shifted right by 1, 3, 4, 6 and 8. As in the document's
// delay-optimised form, the shifted copies of A and of B are summed in one
// adder tree (written here as one sum of ten terms, kept at full precision)
// and a single truncation by 8 bits follows, so no adder sits in front of the
// tree. The output is one bit wider than the input because a component of the
// product can reach sqrt(2) times a full-scale input component.
// Combinational.
module mul_w8 #(
  parameter int W = 20
) (
  input  logic                sel3,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic signed [W:0]   out_re,
  output logic signed [W:0]   out_im
);
  localparam int SW = W + 9;  // room for the 8 fraction bits and the sum

  function automatic logic signed [SW-1:0] k181(logic signed [W-1:0] x);
    logic signed [SW-1:0] e;
    e = SW'(x);
    return (e <<< 7) + (e <<< 5) + (e <<< 4) + (e <<< 2) + e;
  endfunction

  logic signed [SW-1:0] sum_re, sum_im;
  logic signed [W:0]    r1, i1;

  always_comb begin
    sum_re = k181(in_re) + k181(in_im);   // A/sqrt2 + B/sqrt2
    sum_im = k181(in_im) - k181(in_re);   // B/sqrt2 - A/sqrt2
    r1 = (W+1)'(sum_re >>> 8);
    i1 = (W+1)'(sum_im >>> 8);
    if (sel3) begin                       // extra -j for W8^3
      out_re = i1;
      out_im = -r1;
    end else begin
      out_re = r1;
      out_im = i1;
    end
  end
endmodule
