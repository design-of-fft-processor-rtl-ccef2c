// fixed_point - scale-down block at the output of a processing element.
//
// Drops the `shift` least significant bits (arithmetic shift right, i.e.
// truncation) so that the result has the integer bits that the stage and the
// mode call for, then limits it to WL bits. The shift of each stage and mode
// is given by fft_pkg::stage_shift (IFFT 3, 3, 3, 1; FFT 0, 3, 0, 0). The
// document's range analysis keeps every value inside WL bits for its input
// range, so the saturation, this design's addition, only acts on inputs
// outside it. Registered: out follows in by one clock.
module fixed_point #(
  parameter int W_IN = 25,
  parameter int WL   = 20
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [1:0]             shift,
  input  logic signed [W_IN-1:0] in_re,
  input  logic signed [W_IN-1:0] in_im,
  output logic                   out_valid,
  output logic signed [WL-1:0]   out_re,
  output logic signed [WL-1:0]   out_im
);
  localparam logic signed [W_IN-1:0] MAXV = W_IN'((64'sd1 <<< (WL - 1)) - 1);
  localparam logic signed [W_IN-1:0] MINV = W_IN'(-(64'sd1 <<< (WL - 1)));

  function automatic logic signed [WL-1:0] scale(logic signed [W_IN-1:0] x, logic [1:0] sh);
    logic signed [W_IN-1:0] y;
    y = x >>> sh;
    if (y > MAXV) return MAXV[WL-1:0];
    if (y < MINV) return MINV[WL-1:0];
    return y[WL-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_re <= '0; out_im <= '0;
    end else begin
      out_valid <= in_valid;
      out_re    <= scale(in_re, shift);
      out_im    <= scale(in_im, shift);
    end
  end
endmodule
