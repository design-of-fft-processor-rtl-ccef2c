// sdf_stage - one radix-2 single-path delay-feedback (SDF) butterfly stage.
//
// Samples arrive one per clock with a 3-bit position tag that counts 0..7 over
// each 8-sample group (the tag keeps counting through invalid slots). The tag
// bit of weight M splits the stream into blocks of 2M samples and selects the
// phase inside a block:
//   first half  (bit = 0): the sample is pushed into the M-word feedback shift
//                          register, and the difference stored during the
//                          previous block's second half leaves the stage;
//   second half (bit = 1): the stored sample a from M slots earlier is
//                          combined with the incoming x: a + x leaves the
//                          stage, a - x is pushed into the feedback register.
// With M = 4, 2, 1 in a row this is the radix-2^3 SDF of the processing
// element. The output is registered and one bit wider than the input. Its
// position tag is the input tag minus M (mod 8): the sums of a block take its
// first M output positions and the differences the next M. A valid flag
// travels with every word, so bubbles flush the stage without special
// handling.
// Latency: output position j appears M + 1 clocks after input position j.
module sdf_stage #(
  parameter int M = 4,
  parameter int W = 20
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [2:0]          in_pos,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic                out_valid,
  output logic [2:0]          out_pos,
  output logic signed [W:0]   out_re,
  output logic signed [W:0]   out_im
);
  typedef struct packed {
    logic              v;
    logic signed [W:0] re;
    logic signed [W:0] im;
  } word_t;

  word_t fb [M];       // feedback shift register, fb[M-1] is the oldest
  word_t x, push, outw;
  logic  second;

  always_comb begin
    x.v    = in_valid;
    x.re   = (W+1)'(in_re);
    x.im   = (W+1)'(in_im);
    second = (in_pos & 3'(M)) != 3'd0;
    if (second) begin
      outw.v  = in_valid;
      outw.re = fb[M-1].re + x.re;
      outw.im = fb[M-1].im + x.im;
      push.v  = in_valid;
      push.re = fb[M-1].re - x.re;
      push.im = fb[M-1].im - x.im;
    end else begin
      outw = fb[M-1];
      push = x;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < M; i++) fb[i] <= '0;
      out_valid <= 1'b0; out_pos <= '0; out_re <= '0; out_im <= '0;
    end else begin
      fb[0] <= push;
      for (int i = 1; i < M; i++) fb[i] <= fb[i-1];
      out_valid <= outw.v;
      out_pos   <= in_pos - 3'(M);
      out_re    <= outw.re;
      out_im    <= outw.im;
    end
  end
endmodule
