// cmplx_mult - complex multiplier with three real multipliers.
//
//   (A + Bj)(C + Dj) = (A(C+D) - D(A+B)) + (A(C+D) + C(B-A)) j
//
// A + Bj is the W-bit data, C + Dj the TW_W-bit twiddle with TW_FRAC fraction
// bits (Q2.16 for the default 18 bits, so 1.0 is exact). Pipeline: the three
// pre-additions and products are registered in the first cycle, the final
// subtraction and addition (truncated by TW_FRAC bits) in the second, so the
// result and out_valid follow in_valid by two clocks. The output has the
// width of the input plus one bit, since |twiddle| <= 1 the magnitude cannot
// grow beyond rounding of the twiddle.
module cmplx_mult #(
  parameter int W       = 24,
  parameter int TW_W    = 18,
  parameter int TW_FRAC = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [W-1:0]    a,   // data, real
  input  logic signed [W-1:0]    b,   // data, imaginary
  input  logic signed [TW_W-1:0] c,   // twiddle, real
  input  logic signed [TW_W-1:0] d,   // twiddle, imaginary
  output logic                   out_valid,
  output logic signed [W:0]      out_re,
  output logic signed [W:0]      out_im
);
  localparam int PW = W + TW_W + 2;

  logic signed [PW-1:0] p_acd, p_dab, p_cba;   // A(C+D), D(A+B), C(B-A)
  logic                 v1;
  logic signed [PW-1:0] re_full, im_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; out_valid <= 1'b0;
      p_acd <= '0; p_dab <= '0; p_cba <= '0;
      out_re <= '0; out_im <= '0;
    end else begin
      v1    <= in_valid;
      p_acd <= PW'(a) * (PW'(c) + PW'(d));
      p_dab <= PW'(d) * (PW'(a) + PW'(b));
      p_cba <= PW'(c) * (PW'(b) - PW'(a));
      out_valid <= v1;
      out_re <= (W+1)'(re_full >>> TW_FRAC);
      out_im <= (W+1)'(im_full >>> TW_FRAC);
    end
  end

  always_comb begin
    re_full = p_acd - p_dab;
    im_full = p_acd + p_cba;
  end
endmodule
