// fft_pipo_top - 1024-point FFT/IFFT processor with 8 parallel inputs and 8
// parallel outputs, both in normal order.
//
// The processor is memory based: the 1024 samples sit in 8 single-port banks
// of 128 words, and the transform is computed in place as three radix-8
// stages (Eq. n = n1 + 2 n2 + 16 n3 + 128 n4: stage 1 transforms over n4,
// stage 2 over n3, stage 3 over n2) plus a final radix-2 stage over n1. Each
// radix-8 stage is done by four radix-2/4/8 SDF processing elements (pe) that
// together read four and write four samples per clock; the radix-2 stage needs
// no memory pass of its own, because two radix-2 butterfly units (r2_bu)
// combine the stage-3 results of PE0/PE1 and PE2/PE3 on their way back to
// memory. The bank of a sample is skewed by its top address bits, so eight
// consecutive inputs and eight consecutive results each fall into eight
// different banks: both sides stream 8 samples per clock in normal order
// with no reorder buffer. IFFT = conj(FFT(conj(X))): the PEs conjugate on the
// way in during stage 1 and the butterfly units on the way out.
//
// Use: while in_ready, present rows c = 0..127 (x(8c+i) on lane i) with
// in_valid; then pulse fft_start with mode_ifft. The transform takes 1176
// clocks; the first output row appears 1178 clocks after the clock that
// samples fft_start, and the result leaves as 128 consecutive rows with
// out_valid (X(8c+i) on lane i); done pulses with the last row. state, stage
// and the inner/outer stage pulses show the controller's progress.
// Formats: input Q3.17; output Q6.14 in FFT mode and Q13.7 in IFFT mode, so
// the IFFT output word read as Q3.17 is 1/1024 times the unscaled inverse
// DFT sum, the usual 1/N of an IFFT. The FFT-mode formats are sized, as in
// the document, for channel-estimation input where only samples among the
// first 128 are non-zero; a dense full-scale FFT input saturates in stage 1.
//
// Pipeline of a stage: bank read (1) -> PE (17) -> [stage 3: r2_bu (1)] ->
// delay to the write slot -> write, 24 clocks after the read in stages 1 and
// 2 and 22 in stage 3, as the document chooses; the padding registers that
// fill the gap are this design's.
// The checking assertions sample rst_n on the clock while the flip-flops use
// it as an asynchronous reset; lint reports rst_n as used both ways, which
// concerns the checks only, not the circuit.
module fft_pipo_top
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  mode_ifft,
  input  logic  in_valid,
  input  cplx_t in_data  [NBANK],
  output logic  in_ready,
  input  logic  fft_start,
  output logic  busy,
  output logic  out_valid,
  output cplx_t out_data [NBANK],
  output logic  done,
  // controller status
  output state_e state,
  output stage_e stage,
  output logic  inner_stage_inc,
  output logic  outer_stage_inc
);
  localparam int PAD12  = D_STAGE12 - MEM_LAT - PE_LAT;
  localparam int PAD3   = D_STAGE3 - MEM_LAT - PE_LAT - BU_LAT;
  localparam int PADMAX = (PAD12 > PAD3) ? PAD12 : PAD3;

  // ---------------------------------------------------------------- control
  mem_req_t         rd_req [NBANK];
  mem_req_t         wr_req [NBANK];
  logic             loading, unloading;
  logic [2:0]       pe_tag [NPE];
  logic [TW_AW-1:0] pe_tw  [NPE];
  logic             conj_in, conj_out;
  logic [1:0]       pe_shift, bu_shift;

  fft_ctrl u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .fft_start, .mode_ifft, .busy, .done,
    .rd_req, .wr_req, .loading, .unloading, .pe_tag, .pe_tw, .stage,
    .conj_in, .conj_out, .pe_shift, .bu_shift, .state, .inner_stage_inc, .outer_stage_inc);

  // ---------------------------------------------------------------- memory
  logic               rd_en  [NBANK];
  logic [BANK_AW-1:0] rd_row [NBANK];
  logic               wr_we  [NBANK];
  logic [BANK_AW-1:0] wr_row [NBANK];
  cplx_t              wr_d   [NBANK];
  cplx_t              bank_q [NBANK];
  cplx_t              rd_data [NBANK];
  cplx_t              wr_data [NBANK];

  rd_commutator #(.NREQ(NBANK)) u_rdc (
    .clk, .rst_n, .req(rd_req), .bank_en(rd_en), .bank_row(rd_row), .bank_q(bank_q), .data(rd_data));

  wr_commutator #(.NREQ(NBANK)) u_wrc (
    .clk, .rst_n, .req(wr_req), .data(wr_data), .bank_we(wr_we), .bank_row(wr_row), .bank_d(wr_d));

  for (genvar j = 0; j < NBANK; j++) begin : g_bank
    mem_bank #(.DEPTH(BANK_DEPTH), .W(2 * WL)) u_mem (
      .clk,
      .en   (rd_en[j] | wr_we[j]),
      .we   (wr_we[j]),
      .addr (wr_we[j] ? wr_row[j] : rd_row[j]),
      .wdata(wr_d[j]),
      .rdata(bank_q[j]));
  end

  // ------------------------------------------------------ processing elements
  logic             pe_iv  [NPE];
  logic [2:0]       pe_itg [NPE];
  logic [TW_AW-1:0] pe_itw [NPE];
  logic             pe_ov  [NPE];
  cplx_t            pe_od  [NPE];

  always_ff @(posedge clk or negedge rst_n) begin   // align with bank read latency
    if (!rst_n) begin
      for (int p = 0; p < NPE; p++) begin
        pe_iv[p] <= 1'b0; pe_itg[p] <= '0; pe_itw[p] <= '0;
      end
    end else begin
      for (int p = 0; p < NPE; p++) begin
        pe_iv[p]  <= rd_req[p].valid && !unloading;
        pe_itg[p] <= pe_tag[p];
        pe_itw[p] <= pe_tw[p];
      end
    end
  end

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    pe #(.PE_ID(p)) u_pe (
      .clk, .rst_n, .in_valid(pe_iv[p]), .in_tag(pe_itg[p]), .in_data(rd_data[p]),
      .in_tw_addr(pe_itw[p]), .conj(conj_in), .shift(pe_shift),
      .out_valid(pe_ov[p]), .out_data(pe_od[p]));
  end

  // ------------------------------------------- radix-2 units (stage 4 in 3)
  logic  bu_ov [2];
  cplx_t bu_x  [2];
  cplx_t bu_y  [2];
  for (genvar u = 0; u < 2; u++) begin : g_bu
    r2_bu #(.WL(WL)) u_bu (
      .clk, .rst_n, .in_valid(pe_ov[2*u] & pe_ov[2*u+1]), .shift(bu_shift), .conj(conj_out),
      .a_re(pe_od[2*u].re), .a_im(pe_od[2*u].im), .b_re(pe_od[2*u+1].re), .b_im(pe_od[2*u+1].im),
      .out_valid(bu_ov[u]), .x_re(bu_x[u].re), .x_im(bu_x[u].im), .y_re(bu_y[u].re), .y_im(bu_y[u].im));
  end

  // ------------------------------------- padding up to the write slot
  logic  post_v [NPE];
  cplx_t post_d [NPE];
  logic  pad_v  [NPE][PADMAX];
  cplx_t pad_d  [NPE][PADMAX];
  logic  wb_v   [NPE];
  cplx_t wb_d   [NPE];

  always_comb begin
    for (int p = 0; p < NPE; p++) begin
      if (stage == STG3) begin
        post_v[p] = bu_ov[p / 2];
        post_d[p] = (p % 2 == 0) ? bu_x[p / 2] : bu_y[p / 2];
      end else begin
        post_v[p] = pe_ov[p];
        post_d[p] = pe_od[p];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPE; p++)
        for (int i = 0; i < PADMAX; i++) begin pad_v[p][i] <= 1'b0; pad_d[p][i] <= '0; end
    end else begin
      for (int p = 0; p < NPE; p++) begin
        pad_v[p][0] <= post_v[p];
        pad_d[p][0] <= post_d[p];
        for (int i = 1; i < PADMAX; i++) begin
          pad_v[p][i] <= pad_v[p][i-1];
          pad_d[p][i] <= pad_d[p][i-1];
        end
      end
    end
  end

  always_comb begin
    for (int p = 0; p < NPE; p++) begin
      wb_v[p] = (stage == STG3) ? pad_v[p][PAD3-1]  : pad_v[p][PAD12-1];
      wb_d[p] = (stage == STG3) ? pad_d[p][PAD3-1]  : pad_d[p][PAD12-1];
    end
    for (int i = 0; i < NBANK; i++) begin
      if (loading)     wr_data[i] = in_data[i];
      else if (i < NPE) wr_data[i] = wb_d[i];
      else             wr_data[i] = '0;
    end
  end

  // ---------------------------------------------------------------- output
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= unloading;
  end
  always_comb out_data = rd_data;

  // every PE result arrives exactly in the write slot the controller opened
  always_ff @(posedge clk) begin
    if (rst_n && !loading) begin
      for (int p = 0; p < NPE; p++)
        assert (wb_v[p] == wr_req[p].valid)
          else $error("fft_pipo_top: PE slot %0d result/valid mismatch", p);
    end
    if (rst_n) begin
      for (int j = 0; j < NBANK; j++)
        assert (!(rd_en[j] && wr_we[j]))
          else $error("fft_pipo_top: bank %0d read and written in one clock", j);
    end
  end
endmodule
