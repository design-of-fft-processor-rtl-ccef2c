// pe - radix-2/4/8 single-path delay-feedback processing element.
//
// One PE computes radix-8 butterflies on a serial stream: the 8 samples of a
// butterfly arrive on 8 consecutive clocks (in_tag = 0..7), and the 8 results,
// multiplied by their twiddle factors and scaled, leave on 8 consecutive
// clocks in normal order. Inside, in this order:
//   1. conjugation of the input when `conj` is set (first stage of an IFFT);
//   2. three radix-2 SDF stages with feedback lengths 4, 2 and 1 (radix-2^3);
//      between the first and second the samples in positions 6 and 7 are
//      multiplied by -j, between the second and third the odd positions are
//      multiplied by 1, W8^1, -j or W8^3 (constant multiplier, shift-add);
//   3. the three-register reorder buffer (bit-reversed -> normal order);
//   4. the complex multiplier with the twiddle from this PE's own ROM;
//   5. the fixed-point block, shifting right by `shift` into WL bits.
// The structure (SDF 4-2-1, reorder buffer, ROM + multiplier, fixed point)
// follows the document; the placement of the trivial and constant multipliers
// is the one that fits that structure. Each SDF stage adds one guard bit and
// the W8 multiplier another, so the 8-point result is WL+4 bits wide before
// scaling.
//
// Timing: the PE must be clocked every cycle with a tag that keeps counting
// through invalid slots. Result k of a butterfly whose sample 0 entered at
// clock t leaves at t + PE_LAT + k (PE_LAT = 17). tw_addr is supplied with
// each input sample (the ROM address for result k comes with sample k) and is
// delayed internally to meet the result at the multiplier.
// The checking assertions sample rst_n on the clock while the flip-flops use
// it as an asynchronous reset; lint reports rst_n as used both ways, which
// concerns the checks only, not the circuit.
module pe
  import fft_pkg::*;
#(
  parameter int PE_ID = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [2:0]       in_tag,
  input  cplx_t            in_data,
  input  logic [TW_AW-1:0] in_tw_addr,
  input  logic             conj,
  input  logic [1:0]       shift,
  output logic             out_valid,
  output cplx_t            out_data
);
  localparam int W0 = WL + 1;      // after conjugation
  localparam int W1 = W0 + 1;      // after SDF stage 1 (feedback 4)
  localparam int W2 = W1 + 1;      // after SDF stage 2 (feedback 2)
  localparam int W3 = W2 + 1;      // after the W8 multiplier
  localparam int W4 = W3 + 1;      // after SDF stage 3 (feedback 1)
  localparam int WM = W4 + 1;      // after the twiddle multiplier

  // 1. conjugation
  logic signed [W0-1:0] x_re, x_im;
  always_comb begin
    x_re = W0'(in_data.re);
    x_im = conj ? -W0'(in_data.im) : W0'(in_data.im);
  end

  // 2a. SDF stage with feedback 4
  logic                 v1;
  logic [2:0]           p1;
  logic signed [W1-1:0] s1_re, s1_im;
  sdf_stage #(.M(4), .W(W0)) u_sdf4 (
    .clk, .rst_n, .in_valid(in_valid), .in_pos(in_tag), .in_re(x_re), .in_im(x_im),
    .out_valid(v1), .out_pos(p1), .out_re(s1_re), .out_im(s1_im));

  // -j on positions 6 and 7
  logic signed [W1-1:0] nj1_re, nj1_im, t1_re, t1_im;
  mul_neg_j #(.W(W1)) u_nj1 (.in_re(s1_re), .in_im(s1_im), .out_re(nj1_re), .out_im(nj1_im));
  always_comb begin
    if (p1[2] && p1[1]) begin t1_re = nj1_re; t1_im = nj1_im; end
    else                begin t1_re = s1_re;  t1_im = s1_im;  end
  end

  // 2b. SDF stage with feedback 2
  logic                 v2;
  logic [2:0]           p2;
  logic signed [W2-1:0] s2_re, s2_im;
  sdf_stage #(.M(2), .W(W1)) u_sdf2 (
    .clk, .rst_n, .in_valid(v1), .in_pos(p1), .in_re(t1_re), .in_im(t1_im),
    .out_valid(v2), .out_pos(p2), .out_re(s2_re), .out_im(s2_im));

  // W8^(i2 + 2 i1) on odd positions i: 1, W8^1, -j, W8^3
  logic signed [W3-1:0] w8_re, w8_im, t2_re, t2_im;
  logic signed [W2-1:0] nj2_re, nj2_im;
  logic [1:0]           e2;
  mul_w8 #(.W(W2)) u_w8 (.sel3(e2 == 2'd3), .in_re(s2_re), .in_im(s2_im),
                         .out_re(w8_re), .out_im(w8_im));
  mul_neg_j #(.W(W2)) u_nj2 (.in_re(s2_re), .in_im(s2_im), .out_re(nj2_re), .out_im(nj2_im));
  always_comb begin
    e2 = {p2[1], p2[2]};
    if (!p2[0] || e2 == 2'd0) begin
      t2_re = W3'(s2_re); t2_im = W3'(s2_im);
    end else if (e2 == 2'd2) begin
      t2_re = W3'(nj2_re); t2_im = W3'(nj2_im);
    end else begin
      t2_re = w8_re; t2_im = w8_im;
    end
  end

  // 2c. SDF stage with feedback 1
  logic                 v3;
  logic [2:0]           p3;
  logic signed [W4-1:0] s3_re, s3_im;
  sdf_stage #(.M(1), .W(W3)) u_sdf1 (
    .clk, .rst_n, .in_valid(v2), .in_pos(p2), .in_re(t2_re), .in_im(t2_im),
    .out_valid(v3), .out_pos(p3), .out_re(s3_re), .out_im(s3_im));

  // 3. reorder buffer
  logic                 v4;
  logic [2:0]           k4;
  logic signed [W4-1:0] r_re, r_im;
  reorder_buf #(.W(W4)) u_ro (
    .clk, .rst_n, .in_valid(v3), .in_pos(p3), .in_re(s3_re), .in_im(s3_im),
    .out_valid(v4), .out_k(k4), .out_re(r_re), .out_im(r_im));

  // twiddle address, delayed to meet result k at the multiplier
  localparam int TWD = SDF_LAT + RO_LAT;
  logic [TW_AW-1:0] twa_d [TWD];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < TWD; i++) twa_d[i] <= '0;
    end else begin
      twa_d[0] <= in_tw_addr;
      for (int i = 1; i < TWD; i++) twa_d[i] <= twa_d[i-1];
    end
  end

  // 4. twiddle ROM and complex multiplier
  logic signed [TW_W-1:0] tw_re, tw_im;
  tw_rom #(.PE_ID(PE_ID), .TW_W(TW_W), .TW_FRAC(TW_FRAC)) u_rom (
    .addr(twa_d[TWD-1]), .tw_re(tw_re), .tw_im(tw_im));

  logic                 v5;
  logic signed [WM-1:0] m_re, m_im;
  cmplx_mult #(.W(W4), .TW_W(TW_W), .TW_FRAC(TW_FRAC)) u_cm (
    .clk, .rst_n, .in_valid(v4), .a(r_re), .b(r_im), .c(tw_re), .d(tw_im),
    .out_valid(v5), .out_re(m_re), .out_im(m_im));

  // 5. fixed-point block
  fixed_point #(.W_IN(WM), .WL(WL)) u_fp (
    .clk, .rst_n, .in_valid(v5), .shift(shift), .in_re(m_re), .in_im(m_im),
    .out_valid(out_valid), .out_re(out_data.re), .out_im(out_data.im));

  // the twiddle address must belong to the result it meets
  property p_tw_align;
    @(posedge clk) disable iff (!rst_n) v4 |-> (twa_d[TWD-1][2:0] == k4);
  endproperty
  a_tw_align: assert property (p_tw_align);
endmodule
