// tb_fft_ctrl - runs the controller alone through load, the three compute
// stages and unload, twice (FFT then IFFT), and checks the schedule it
// produces against the rules the datapath relies on:
//   - load writes rows 0..127 to addresses 8r..8r+7;
//   - in every cycle, all valid reads and writes hit different banks;
//   - in each stage every address is read once and written once, D clocks
//     after its read (24 in stages 1 and 2, 22 in stage 3), by the same PE;
//   - no address is read before the previous stage (or the load) wrote it;
//   - unload reads X(8r + i) from the digit-reversed address
//     {k2k1k0, k5k4k3, k8k7k6, k9} on lane i, after stage 3 wrote it;
//   - 14 inner-stage and 3 outer-stage steps per transform, 1176 compute
//     clocks between the start and the unload, one done pulse, and all controller states visited.
module tb_fft_ctrl;
  import fft_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, fft_start = 1'b0, mode_ifft = 1'b0;
  logic in_ready, busy, done, loading, unloading;
  mem_req_t rd_req [NBANK], wr_req [NBANK];
  logic [2:0] pe_tag [NPE];
  logic [TW_AW-1:0] pe_tw [NPE];
  stage_e stage;
  logic conj_in, conj_out, inner_stage_inc, outer_stage_inc;
  logic [1:0] pe_shift, bu_shift;
  state_e state;
  int checks = 0, failures = 0, t = 0;
  int wr_stage [1024];          // last stage that wrote the address (0 = load)
  int rd_time [1024], rd_pe [1024], rd_cnt [1024], wr_cnt [1024];
  int n_inner = 0, n_outer = 0, n_done = 0, t_start = -1, t_unload = -1, ul_row = 0;
  bit seen_state [7];

  fft_ctrl dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL t=%0d: %s", t, s); end
  endtask
  function automatic int bank(logic [9:0] a);
    return (int'(a[2:0]) + int'(a[9:7])) % 8;
  endfunction

  always @(negedge clk) if (rst_n) begin
    bit used [8];
    int s;
    t++;
    s = int'(stage) + 1;
    seen_state[int'(state)] = 1;
    if (inner_stage_inc) n_inner++;
    if (outer_stage_inc) n_outer++;
    if (done) n_done++;
    if (unloading && t_unload < 0) t_unload = t;
    for (int b = 0; b < 8; b++) used[b] = 0;
    for (int i = 0; i < NBANK; i++) begin
      if (rd_req[i].valid) begin
        chk(!used[bank(rd_req[i].addr)], $sformatf("bank %0d used twice", bank(rd_req[i].addr)));
        used[bank(rd_req[i].addr)] = 1;
      end
      if (wr_req[i].valid) begin
        chk(!used[bank(wr_req[i].addr)], $sformatf("bank %0d used twice", bank(wr_req[i].addr)));
        used[bank(wr_req[i].addr)] = 1;
      end
    end
    if (loading) begin
      for (int i = 0; i < NBANK; i++) begin
        chk(wr_req[i].valid && wr_req[i].addr == 10'(8 * ld_row + i), "load address");
        wr_stage[wr_req[i].addr] = 0;
      end
      ld_row++;
    end else if (unloading) begin
      for (int i = 0; i < NBANK; i++) begin
        logic [9:0] k, a;
        k = 10'(8 * ul_row + i);
        a = {k[2:0], k[5:3], k[8:6], k[9]};
        chk(rd_req[i].valid && rd_req[i].addr == a, $sformatf("unload lane %0d addr %0d", i, rd_req[i].addr));
        chk(wr_stage[a] == 3, "unload before stage 3 wrote");
      end
      ul_row++;
    end else if (busy) begin
      for (int p = 0; p < NPE; p++) begin
        if (rd_req[p].valid) begin
          logic [9:0] a;
          a = rd_req[p].addr;
          chk(wr_stage[a] == s - 1, $sformatf("stage %0d reads %0d before it was written", s, a));
          rd_time[a] = t; rd_pe[a] = p; rd_cnt[a]++;
        end
        if (wr_req[p].valid) begin
          logic [9:0] a;
          int d;
          a = wr_req[p].addr;
          d = (s == 3) ? D_STAGE3 : D_STAGE12;
          chk(t - rd_time[a] == d && rd_pe[a] == p,
              $sformatf("PE%0d writes %0d %0d clocks after the read by PE%0d", p, a, t - rd_time[a], rd_pe[a]));
          wr_stage[a] = s; wr_cnt[a]++;
        end
      end
      for (int p = NPE; p < NBANK; p++) chk(!rd_req[p].valid && !wr_req[p].valid, "lane 4..7 used while computing");
    end
  end

  int ld_row = 0;

  task automatic run(bit ifft);
    int inner0, outer0;
    inner0 = n_inner; outer0 = n_outer;
    for (int a = 0; a < 1024; a++) begin rd_cnt[a] = 0; wr_cnt[a] = 0; wr_stage[a] = -1; end
    ld_row = 0; ul_row = 0; t_unload = -1;
    // load with a gap, as a host that is not always ready would
    while (ld_row < 128) begin
      in_valid = (ld_row % 37 != 5) || ($urandom_range(1) == 1);
      chk(in_ready, "in_ready while idle");
      @(negedge clk);
    end
    in_valid = 0;
    mode_ifft = ifft; fft_start = 1;
    t_start = t + 1;
    @(negedge clk);
    fft_start = 0;
    chk(busy && !in_ready, "busy after start");
    while (n_done == 0 || busy) @(negedge clk);
    n_done = 0;
    for (int a = 0; a < 1024; a++) chk(rd_cnt[a] == 3 && wr_cnt[a] == 3, $sformatf("address %0d read %0d, written %0d times", a, rd_cnt[a], wr_cnt[a]));
    chk(ul_row == 128, $sformatf("%0d unload rows", ul_row));
    chk(n_inner - inner0 == 14, $sformatf("%0d inner-stage steps", n_inner - inner0));
    chk(n_outer - outer0 == 3, $sformatf("%0d outer-stage steps", n_outer - outer0));
    // the clock that samples fft_start, then 1176 compute clocks
    chk(t_unload - t_start == 1 + 1176, $sformatf("transform took %0d clocks", t_unload - t_start));
    $display("%s: transform %0d clocks, inner steps %0d, outer steps %0d",
             ifft ? "IFFT" : "FFT", t_unload - t_start, n_inner - inner0, n_outer - outer0);
  endtask

  initial begin
    for (int a = 0; a < 1024; a++) begin rd_time[a] = 0; rd_pe[a] = 0; end
    for (int i = 0; i < 7; i++) seen_state[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run(0);
    repeat (5) @(negedge clk);
    run(1);
    for (int i = 0; i < 7; i++) chk(seen_state[i], $sformatf("state %0d never seen", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
