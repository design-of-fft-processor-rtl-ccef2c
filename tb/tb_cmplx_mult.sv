// tb_cmplx_mult - checks the three-multiplier complex product against the
// four-multiplier formula (AC - BD) + (AD + BC)j, truncated by 16 bits, and
// its two-clock latency, on random data and twiddles (incl. full-scale ones).
module tb_cmplx_mult;
  localparam int W = 24, TW_W = 18;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [W-1:0] a = '0, b = '0;
  logic signed [TW_W-1:0] c = '0, d = '0;
  logic out_valid;
  logic signed [W:0] out_re, out_im;
  int checks = 0, failures = 0;
  longint exp_re [$], exp_im [$];
  int lat_ok = 1;

  cmplx_mult #(.W(W), .TW_W(TW_W), .TW_FRAC(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      in_valid = ($urandom_range(3) != 0);
      a = W'($urandom); b = W'($urandom);
      c = TW_W'($urandom_range(131072) - 65536);
      d = TW_W'($urandom_range(131072) - 65536);
      if (n % 50 == 0) begin c = 18'sd65536; d = 0; end
      if (in_valid) begin
        exp_re.push_back((longint'(a) * c - longint'(b) * d) >>> 16);
        exp_im.push_back((longint'(a) * d + longint'(b) * c) >>> 16);
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (exp_re.size() != 0) begin failures++; $display("FAIL: %0d results missing", exp_re.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // latency: out_valid is in_valid two clocks later
  logic v_d1 = 0, v_d2 = 0;
  always @(posedge clk) begin
    v_d2 <= v_d1; v_d1 <= in_valid;
  end
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (out_valid != v_d2) begin failures++; $display("FAIL: latency"); end
    if (out_valid) begin
      checks++;
      if (out_re != exp_re[0] || out_im != exp_im[0]) begin
        failures++; $display("FAIL: got %0d %0d exp %0d %0d", out_re, out_im, exp_re[0], exp_im[0]);
      end
      void'(exp_re.pop_front()); void'(exp_im.pop_front());
    end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
