// tb_fft_pipo_top - end-to-end test of the 1024-point FFT/IFFT processor at
// its default (full) size.
//
// Each run loads 128 rows of 8 samples, starts the transform, collects the
// 128 output rows and compares them with a double-precision DFT computed here
// (X(k) = sum x(n) exp(-j 2 pi nk/1024) for FFT, the unscaled conjugate sum for
// IFFT). It checks the SQNR of each run, the position of every output (normal
// order, lane i = X(8c+i)), the latency from fft_start to the first output
// row, the error of every single output bin, and counts the controller's inner- and outer-stage stalls, the
// FFT/IFFT mode switches and the stage-3 offset of PE2/PE3.
// Runs: impulse and sparse FFT (8 nonzero inputs among the first 128, the
// channel-estimation case), dense IFFT (1024 random inputs in +-2), dense
// low-amplitude FFT, and a second sparse FFT after the IFFT.
module tb_fft_pipo_top;
  import fft_pkg::*;

  localparam int  NR       = N / NBANK;                       // 128 rows
  localparam int  EXP_LAT  = 280 + 8 * 56 + 8 * 56 + 2;       // fft_start -> first out row
  localparam int  REQ_LAT  = 1960;                            // 25 us at 78.4 MHz
  localparam real PI       = 3.14159265358979323846;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  mode_ifft = 1'b0, in_valid = 1'b0, fft_start = 1'b0;
  cplx_t in_data [NBANK];
  logic  in_ready, busy, out_valid, done;
  cplx_t out_data [NBANK];
  state_e state;
  stage_e stage;
  logic  inner_stage_inc, outer_stage_inc;

  fft_pipo_top dut (.*);

  always #5 clk = ~clk;

  int  checks = 0, failures = 0;
  int  n_inner = 0, n_outer = 0, n_fft = 0, n_ifft = 0, n_switch = 0, n_pe23_late = 0;
  real xr [N], xi [N], yr [N], yi [N];
  real cs [N], sn [N];
  logic last_mode;
  bit   first_run = 1'b1;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic real q(logic signed [WL-1:0] v, int frac);
    return real'(v) / real'(1 << frac);
  endfunction

  function automatic logic signed [WL-1:0] toq(real v, int frac);
    return WL'($rtoi($floor(v * real'(1 << frac) + 0.5)));
  endfunction

  always @(posedge clk) begin
    if (inner_stage_inc) n_inner++;
    if (outer_stage_inc) n_outer++;
    if (stage == STG3 && dut.u_ctrl.rd_req[0].valid && !dut.u_ctrl.rd_req[2].valid) n_pe23_late++;
  end

  real e2 [N];   // squared error of each output bin

  task automatic run(bit ifft, real min_sqnr, string name);
    int   lat, t0, rows;
    real  sig, err, sqnr, er, ei, ar, ai, maxe;
    bit   order_ok;
    int   inner0, outer0;
    int   frac_in, frac_out;
    frac_in  = WL - int_bits(ifft, 0);
    frac_out = WL - int_bits(ifft, 4);
    inner0 = n_inner; outer0 = n_outer;
    // reference DFT
    for (int k = 0; k < N; k++) begin
      ar = 0.0; ai = 0.0;
      for (int n = 0; n < N; n++) begin
        int e;
        real qr, qi;
        e  = (n * k) % N;
        qr = q(toq(xr[n], frac_in), frac_in);
        qi = q(toq(xi[n], frac_in), frac_in);
        if (ifft) begin                       // x * exp(+j...)
          ar += qr * cs[e] - qi * sn[e];
          ai += qr * sn[e] + qi * cs[e];
        end else begin                        // x * exp(-j...)
          ar += qr * cs[e] + qi * sn[e];
          ai += qi * cs[e] - qr * sn[e];
        end
      end
      yr[k] = ar; yi[k] = ai;
    end
    // load
    @(negedge clk);
    chk(in_ready, {name, ": in_ready before load"});
    for (int c = 0; c < NR; c++) begin
      in_valid = 1'b1;
      for (int i = 0; i < NBANK; i++) begin
        in_data[i].re = toq(xr[8*c+i], frac_in);
        in_data[i].im = toq(xi[8*c+i], frac_in);
      end
      @(negedge clk);
    end
    in_valid = 1'b0;
    // start
    mode_ifft = ifft; fft_start = 1'b1;
    if (!first_run && ifft != last_mode) n_switch++;
    if (ifft) n_ifft++; else n_fft++;
    last_mode = ifft; first_run = 1'b0;
    @(negedge clk);
    fft_start = 1'b0;
    t0 = 1; lat = 0;
    while (!out_valid) begin @(negedge clk); lat++; end
    lat += t0;
    chk(lat == EXP_LAT, $sformatf("%s: latency %0d, expected %0d", name, lat, EXP_LAT));
    chk(lat <= REQ_LAT, $sformatf("%s: latency %0d over the %0d-clock requirement", name, lat, REQ_LAT));
    // collect
    sig = 0.0; err = 0.0; maxe = 0.0; order_ok = 1'b1; rows = 0;
    while (out_valid) begin
      for (int i = 0; i < NBANK; i++) begin
        int k;
        k  = 8 * rows + i;
        er = q(out_data[i].re, frac_out) - yr[k];
        ei = q(out_data[i].im, frac_out) - yi[k];
        e2[k] = er * er + ei * ei;
        sig += yr[k] * yr[k] + yi[k] * yi[k];
        err += er * er + ei * ei;
        if (er * er + ei * ei > maxe) maxe = er * er + ei * ei;
      end
      rows++;
      @(negedge clk);
    end
    chk(rows == NR, $sformatf("%s: %0d output rows", name, rows));
    sqnr = (err > 0.0) ? 10.0 * $log10(sig / err) : 200.0;
    // every bin on its own: its error may not exceed 8 times the rms error
    // that the SQNR requirement allows, so one wrong lane or row is caught
    // even when the total SQNR still passes
    begin
      real tol2;
      int  bad;
      tol2 = 64.0 * (sig / N) * $pow(10.0, -min_sqnr / 10.0);
      bad  = 0;
      for (int k = 0; k < N; k++) begin
        checks++;
        if (e2[k] > tol2) begin
          failures++; bad++;
          if (bad <= 3) $display("FAIL: %s: X(%0d) error %0.3g", name, k, $sqrt(e2[k]));
        end
      end
    end
    $display("%s: latency %0d clocks, SQNR %0.1f dB, max |err| %0.3g", name, lat, sqnr, $sqrt(maxe));
    chk(sqnr >= min_sqnr, $sformatf("%s: SQNR %0.1f dB below %0.1f", name, sqnr, min_sqnr));
    chk(n_inner - inner0 == 14, $sformatf("%s: %0d inner-stage stalls", name, n_inner - inner0));
    chk(n_outer - outer0 == 3, $sformatf("%s: %0d outer-stage steps", name, n_outer - outer0));
    repeat (3) @(negedge clk);
    chk(!busy && in_ready, {name, ": idle after unload"});
  endtask

  initial begin
    for (int e = 0; e < N; e++) begin
      cs[e] = $cos(2.0 * PI * e / N);
      sn[e] = $sin(2.0 * PI * e / N);
    end
    for (int i = 0; i < NBANK; i++) in_data[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1. impulse at n = 3 (FFT): X(k) = exp(-j 2 pi 3k/1024)
    for (int n = 0; n < N; n++) begin xr[n] = 0.0; xi[n] = 0.0; end
    xr[3] = 1.5; xi[3] = -0.5;
    run(1'b0, 70.0, "fft impulse");

    // 2. sparse FFT: 8 random nonzero inputs among the first 128, +-2
    for (int n = 0; n < N; n++) begin xr[n] = 0.0; xi[n] = 0.0; end
    for (int i = 0; i < 8; i++) begin
      int n;
      n = 16 * i + int'($urandom_range(15));
      xr[n] = 4.0 * ($urandom_range(65535) / 65536.0) - 2.0;
      xi[n] = 4.0 * ($urandom_range(65535) / 65536.0) - 2.0;
    end
    run(1'b0, 75.0, "fft sparse");

    // 3. dense IFFT: 1024 random inputs, +-2
    for (int n = 0; n < N; n++) begin
      xr[n] = 4.0 * ($urandom_range(65535) / 65536.0) - 2.0;
      xi[n] = 4.0 * ($urandom_range(65535) / 65536.0) - 2.0;
    end
    run(1'b1, 60.1, "ifft dense");

    // 4. dense FFT at low amplitude, +-0.25
    for (int n = 0; n < N; n++) begin
      xr[n] = 0.5 * ($urandom_range(65535) / 65536.0) - 0.25;
      xi[n] = 0.5 * ($urandom_range(65535) / 65536.0) - 0.25;
    end
    run(1'b0, 50.0, "fft dense");

    // 5. sparse FFT again after the mode switch
    for (int n = 0; n < N; n++) begin xr[n] = 0.0; xi[n] = 0.0; end
    for (int i = 0; i < 8; i++) begin
      xr[8 * i + 5] = (i % 2 == 0) ? 1.75 : -1.25;
      xi[8 * i + 5] = 0.125 * i - 0.5;
    end
    run(1'b0, 70.0, "fft sparse 2");

    // every mechanism must have happened
    chk(n_fft > 0,  "FFT mode never ran");
    chk(n_ifft > 0, "IFFT mode never ran");
    chk(n_switch >= 2, $sformatf("only %0d mode switches", n_switch));
    chk(n_inner > 0, "no inner-stage stall");
    chk(n_outer > 0, "no outer-stage step");
    chk(n_pe23_late > 0, "PE2/PE3 never ran one clock late in stage 3");
    $display("mechanisms: fft runs %0d, ifft runs %0d, mode switches %0d, inner stalls %0d, outer steps %0d, PE2/3 late clocks %0d",
             n_fft, n_ifft, n_switch, n_inner, n_outer, n_pe23_late);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
