// r2_bu - radix-2 butterfly unit of the last (fourth) FFT stage.
//
// The 1024-point transform is three radix-8 stages and one radix-2 stage.
// Instead of spending a whole memory pass on the radix-2 stage, two PEs that
// work on the partner samples n1 = 0 (a) and n1 = 1 (b) in lockstep during
// stage 3 feed this unit, which forms X = a + b and Y = a - b, shifts them
// right by `shift` (1 in IFFT mode, 0 in FFT mode), limits them to WL bits and
// conjugates them in IFFT mode (the output half of IFFT = conj(FFT(conj))).
// Registered: outputs follow inputs by one clock. Saturation is this
// design's safety net; the document's range analysis does not need it.
module r2_bu #(
  parameter int WL = 20
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [1:0]           shift,
  input  logic                 conj,
  input  logic signed [WL-1:0] a_re,
  input  logic signed [WL-1:0] a_im,
  input  logic signed [WL-1:0] b_re,
  input  logic signed [WL-1:0] b_im,
  output logic                 out_valid,
  output logic signed [WL-1:0] x_re,   // a + b
  output logic signed [WL-1:0] x_im,
  output logic signed [WL-1:0] y_re,   // a - b
  output logic signed [WL-1:0] y_im
);
  localparam logic signed [WL+1:0] MAXV = (WL+2)'((64'sd1 <<< (WL - 1)) - 1);
  localparam logic signed [WL+1:0] MINV = (WL+2)'(-(64'sd1 <<< (WL - 1)));

  function automatic logic signed [WL-1:0] fit(logic signed [WL+1:0] v, logic [1:0] sh, logic neg);
    logic signed [WL+1:0] y;
    y = v >>> sh;
    if (neg) y = -y;
    if (y > MAXV) return MAXV[WL-1:0];
    if (y < MINV) return MINV[WL-1:0];
    return y[WL-1:0];
  endfunction

  logic signed [WL+1:0] s_re, s_im, d_re, d_im;
  always_comb begin
    s_re = (WL+2)'(a_re) + (WL+2)'(b_re);
    s_im = (WL+2)'(a_im) + (WL+2)'(b_im);
    d_re = (WL+2)'(a_re) - (WL+2)'(b_re);
    d_im = (WL+2)'(a_im) - (WL+2)'(b_im);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      x_re <= '0; x_im <= '0; y_re <= '0; y_im <= '0;
    end else begin
      out_valid <= in_valid;
      x_re <= fit(s_re, shift, 1'b0);
      x_im <= fit(s_im, shift, conj);
      y_re <= fit(d_re, shift, 1'b0);
      y_im <= fit(d_im, shift, conj);
    end
  end
endmodule
