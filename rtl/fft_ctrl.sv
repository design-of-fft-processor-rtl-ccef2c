// fft_ctrl - controller of the parallel-in/parallel-out FFT/IFFT processor.
//
// Sequence: IDLE (input rows are written while in_valid) -> stage 1 -> stage
// 2 -> stage 3 -> UNLOAD (128 output rows) -> IDLE, started by fft_start.
//
// Within a stage, each PE p runs an 8-bit butterfly counter b; its read and
// write address is fft_pkg::pe_addr(stage, b, p) and its twiddle address
// fft_pkg::tw_addr(stage, b). A stage is split into inner stages (groups) of
// G counts: one group of 256 in stage 1, eight groups of 32 in stages 2 and 3
// (the bank offset A[9:7] is constant inside such a group). Every sample is
// written back D clocks after it was read (D = 24 in stages 1 and 2, 22 in
// stage 3): with these distances the four reads and four writes of a cycle
// always hit eight different single-port banks. Across a group boundary that
// is no longer true, so the next group waits until the last write of the
// current one is done (inner_stage_inc), and the next stage waits until the
// whole stage has been written (outer_stage_inc). In stage 3, PE0/PE1 and
// PE2/PE3 would address the same banks, so PE2 and PE3 run one clock behind.
// Reads start only when the 3-bit sample tag is 0, so every gap is a whole
// number of 8-clock butterflies and the PE pipelines flush by themselves.
//
// The state follows the pipeline of the current group: S_RD (reads only, until
// the first sample reaches the twiddle multiplier), S_TW (until the first
// write), S_WR (reading and writing), S_WAIT_TW (reads over, samples still
// before the multiplier), S_WAIT_WR (waiting for the last writes).
//
// The state names, D values, address tables and the stall points follow the
// document; the exact group size, the tag alignment and the load/unload
// handshake are this design's choices.
//
// Timing: fft_start in IDLE -> first read on the next clock. The transform
// takes 280 + 8*56 + 8*56 = 1176 clocks; unloading takes 128 more, and
// `done` pulses with the last output row.
module fft_ctrl
  import fft_pkg::*;
#(
  parameter int D12    = D_STAGE12,
  parameter int D3     = D_STAGE3,
  parameter int TW_LAT = MEM_LAT + SDF_LAT + RO_LAT
) (
  input  logic              clk,
  input  logic              rst_n,
  // host side
  input  logic              in_valid,
  output logic              in_ready,
  input  logic              fft_start,
  input  logic              mode_ifft,
  output logic              busy,
  output logic              done,
  // memory requests: slots 0..3 = PEs while computing, 0..7 = lanes on load/unload
  output mem_req_t          rd_req [NBANK],
  output mem_req_t          wr_req [NBANK],
  output logic              loading,
  output logic              unloading,
  // PE control, aligned with rd_req
  output logic [2:0]        pe_tag [NPE],
  output logic [TW_AW-1:0]  pe_tw  [NPE],
  output stage_e            stage,
  output logic              conj_in,
  output logic              conj_out,
  output logic [1:0]        pe_shift,
  output logic [1:0]        bu_shift,
  // status
  output state_e            state,
  output logic              inner_stage_inc,
  output logic              outer_stage_inc
);
  localparam int DMAX = (D12 > D3 + 1) ? D12 : D3 + 1;

  logic [8:0] tcnt;              // clock within the current group
  logic [2:0] grp;               // inner stage within the outer stage
  logic [6:0] ld_cnt, ul_cnt;
  logic       ifft;

  logic [8:0] g_len, g_end;      // reads per group, last clock of the group
  logic [4:0] d_eff;
  logic [7:0] b;
  logic       rd_act;

  function automatic logic [8:0] round8(logic [4:0] d);
    return 9'((int'(d) + 7) / 8 * 8);
  endfunction

  always_comb begin
    g_len  = (stage == STG1) ? 9'd256 : 9'd32;
    d_eff  = (stage == STG3) ? 5'(D3 + 1) : 5'(D12);
    g_end  = g_len + round8(d_eff) - 9'd1;
    b      = (stage == STG1) ? tcnt[7:0] : {grp, tcnt[4:0]};
    rd_act = (state inside {S_RD, S_TW, S_WR}) && (tcnt < g_len);
  end

  // state of the pipeline for a given clock of the group
  function automatic state_e pipe_state(logic [8:0] t, logic [8:0] len, logic [4:0] d);
    if (t < 9'(TW_LAT))       return S_RD;
    if (t < 9'(d))            return S_TW;
    if (t < len)              return S_WR;
    if (t < len + 9'(TW_LAT)) return S_WAIT_TW;
    return S_WAIT_WR;
  endfunction

  logic computing, last_clk, last_grp;
  always_comb begin
    computing       = state inside {S_RD, S_TW, S_WR, S_WAIT_TW, S_WAIT_WR};
    last_clk        = computing && (tcnt == g_end);
    last_grp        = (stage == STG1) || (grp == 3'd7);
    inner_stage_inc = last_clk && !last_grp;
    outer_stage_inc = last_clk && last_grp;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; stage <= STG1; tcnt <= '0; grp <= '0;
      ld_cnt <= '0; ul_cnt <= '0; ifft <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: begin
          if (in_valid) ld_cnt <= ld_cnt + 7'd1;
          if (fft_start) begin
            ifft  <= mode_ifft;
            stage <= STG1; grp <= '0; tcnt <= '0;
            state <= S_RD;
            ld_cnt <= '0;
          end
        end
        S_UNLOAD: begin
          ul_cnt <= ul_cnt + 7'd1;
          if (ul_cnt == 7'd127) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: begin
          if (!last_clk) begin
            tcnt  <= tcnt + 9'd1;
            state <= pipe_state(tcnt + 9'd1, g_len, 5'(d_eff));
          end else if (!last_grp) begin
            tcnt  <= '0;
            grp   <= grp + 3'd1;
            state <= S_RD;
          end else if (stage != STG3) begin
            tcnt  <= '0;
            grp   <= '0;
            stage <= (stage == STG1) ? STG2 : STG3;
            state <= S_RD;
          end else begin
            state  <= S_UNLOAD;
            ul_cnt <= '0;
          end
        end
      endcase
    end
  end

  // per-PE read requests; PE2/PE3 one clock late in stage 3
  logic       rd_act_d;
  logic [7:0] b_d;
  logic [2:0] tag_d;
  mem_req_t   pe_rd [NPE];
  logic [7:0] pe_b  [NPE];
  mem_req_t   wq    [NPE][DMAX];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_act_d <= 1'b0; b_d <= '0; tag_d <= '0;
      for (int p = 0; p < NPE; p++)
        for (int i = 0; i < DMAX; i++) wq[p][i] <= '0;
    end else begin
      rd_act_d <= rd_act;
      b_d      <= b;
      tag_d    <= tcnt[2:0];
      for (int p = 0; p < NPE; p++) begin
        wq[p][0] <= pe_rd[p];
        for (int i = 1; i < DMAX; i++) wq[p][i] <= wq[p][i-1];
      end
    end
  end

  always_comb begin
    for (int p = 0; p < NPE; p++) begin
      if (stage == STG3 && p >= 2) begin
        pe_b[p]        = b_d;
        pe_rd[p].valid = rd_act_d;
        pe_tag[p]      = tag_d;
      end else begin
        pe_b[p]        = b;
        pe_rd[p].valid = rd_act;
        pe_tag[p]      = tcnt[2:0];
      end
      pe_rd[p].addr = pe_addr(stage, pe_b[p], 2'(p));
      pe_tw[p]      = tw_addr(stage, pe_b[p]);
    end
  end

  // memory request slots
  always_comb begin
    loading   = (state == S_IDLE) && in_valid;
    unloading = (state == S_UNLOAD);
    for (int i = 0; i < NBANK; i++) begin
      rd_req[i] = '0;
      wr_req[i] = '0;
      if (unloading) begin
        rd_req[i].valid = 1'b1;
        rd_req[i].addr  = out_addr({ul_cnt, 3'(i)});
      end else if (i < NPE) begin
        rd_req[i] = pe_rd[i];
      end
      if (loading) begin
        wr_req[i].valid = 1'b1;
        wr_req[i].addr  = in_addr({ld_cnt, 3'(i)});
      end else if (i < NPE && computing) begin
        wr_req[i] = (stage == STG3) ? wq[i][D3-1] : wq[i][D12-1];
      end
    end
  end

  always_comb begin
    in_ready = (state == S_IDLE);
    busy     = (state != S_IDLE);
    conj_in  = ifft && (stage == STG1);
    conj_out = ifft;
    pe_shift = stage_shift(ifft, int'(stage) + 1);
    bu_shift = stage_shift(ifft, 4);
  end
endmodule
