// tb_pe - drives the four processing elements with random 8-sample groups,
// random ROM rows, random shift and conjugation, and invalid groups in between.
// Each result is compared with a double-precision reference
//   X(k) = W(e(row, k)) * sum_n x'(n) exp(-j 2 pi n k / 8) / 2^shift,
// x' = conj(x) when conj is set, within a tolerance that covers the
// truncations and the 181/256 approximation of 1/sqrt(2). Result k of a group
// whose sample 0 entered at clock t must appear at clock t + 17 + k.
module tb_pe;
  import fft_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, conj = 1'b0;
  logic [2:0] in_tag = '0;
  logic [1:0] shift = '0;
  logic [TW_AW-1:0] in_tw_addr = '0;
  cplx_t in_data = '0;
  logic out_valid [4];
  cplx_t out_data [4];
  int checks = 0, failures = 0, t = 0, nout = 0, nexp = 0;
  real max_err = 0.0;

  // expected results, indexed by the clock they must appear at
  real exp_re [int], exp_im [int], exp_tol [int];

  for (genvar p = 0; p < 4; p++) begin : g
    pe #(.PE_ID(p)) dut (.clk, .rst_n, .in_valid, .in_tag, .in_data, .in_tw_addr,
      .conj, .shift, .out_valid(out_valid[p]), .out_data(out_data[p]));
  end
  always #5 clk = ~clk;

  function automatic int tw_exp(int p, int a);
    int k;
    k = a % 8;
    if (a < 256) return k * (4 * (a / 8) + p);
    if (a < 288) return 8 * k * (4 * ((a - 256) / 8) + p);
    return 64 * k * (p % 2);
  endfunction

  always @(negedge clk) if (rst_n) begin
    t++;
    for (int p = 0; p < 4; p++) begin
      int key;
      key = t * 4 + p;
      if (out_valid[p]) begin
        nout++;
        checks++;
        if (!exp_re.exists(key)) begin
          failures++; $display("FAIL: PE%0d unexpected output at t=%0d", p, t);
        end else begin
          real er, ei;
          er = out_data[p].re - exp_re[key];
          ei = out_data[p].im - exp_im[key];
          if (er < 0) er = -er;
          if (ei < 0) ei = -ei;
          if (er > max_err) max_err = er;
          if (ei > max_err) max_err = ei;
          if (er > exp_tol[key] || ei > exp_tol[key]) begin
            failures++;
            $display("FAIL: PE%0d t=%0d got %0d %0d exp %f %f", p, t,
                     out_data[p].re, out_data[p].im, exp_re[key], exp_im[key]);
          end
        end
      end else if (exp_re.exists(key)) begin
        checks++; failures++; $display("FAIL: PE%0d missing output at t=%0d", p, t);
      end
    end
  end

  initial begin
    int xr [8], xi [8];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int gi = 0; gi < 300; gi++) begin
      bit v; int row, amp, t0;
      v = ($urandom_range(4) != 0);
      // shift acts at the output: change it only between segments of 30
      // groups, after the pipeline has drained
      if (gi % 30 == 0) begin
        in_valid = 0;
        repeat (24) begin in_tag = in_tag + 3'd1; @(negedge clk); end
        shift = 2'($urandom_range(3));
      end
      conj = 1'($urandom);
      // keep the unscaled result inside the output range for shift 0..3
      amp = (1 << (15 + shift)) - 1;
      row = $urandom_range(36);
      for (int n = 0; n < 8; n++) begin
        xr[n] = int'($urandom_range(2 * amp)) - amp;
        xi[n] = int'($urandom_range(2 * amp)) - amp;
      end
      t0 = t + 1;
      if (v) begin
        for (int p = 0; p < 4; p++)
          for (int k = 0; k < 8; k++) begin
            real sr, si, wr, wi, c, s;
            int key;
            sr = 0; si = 0;
            for (int n = 0; n < 8; n++) begin
              real yi;
              yi = conj ? -xi[n] : xi[n];
              c = $cos(2.0 * PI * n * k / 8.0); s = -$sin(2.0 * PI * n * k / 8.0);
              sr += xr[n] * c - yi * s;
              si += xr[n] * s + yi * c;
            end
            c = $cos(2.0 * PI * tw_exp(p, row * 8 + k) / 1024.0);
            s = -$sin(2.0 * PI * tw_exp(p, row * 8 + k) / 1024.0);
            wr = sr * c - si * s;
            wi = sr * s + si * c;
            key = (t0 + PE_LAT + k) * 4 + p;
            exp_re[key] = wr / (1 << shift);
            exp_im[key] = wi / (1 << shift);
            exp_tol[key] = (8.0 * amp * 3.0e-4 + 8.0) / (1 << shift) + 2.0;
            nexp++;
          end
      end
      for (int n = 0; n < 8; n++) begin
        in_valid = v; in_tag = 3'(n);
        in_data.re = WL'(xr[n]); in_data.im = WL'(xi[n]);
        in_tw_addr = TW_AW'(row * 8 + n);
        @(negedge clk);
      end
    end
    in_valid = 0;
    for (int n = 0; n < 40; n++) begin in_tag = 3'(n); @(negedge clk); end
    checks++;
    if (nout != nexp) begin failures++; $display("FAIL: %0d outputs, %0d expected", nout, nexp); end
    $display("largest error %f LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
