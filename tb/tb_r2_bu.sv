// tb_r2_bu - checks the radix-2 butterfly unit: a + b and a - b, shift right
// by 0 or 1, optional conjugation, saturation, one-clock latency.
module tb_r2_bu;
  localparam int WL = 20;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, conj = 1'b0;
  logic [1:0] shift = '0;
  logic signed [WL-1:0] a_re = '0, a_im = '0, b_re = '0, b_im = '0;
  logic out_valid;
  logic signed [WL-1:0] x_re, x_im, y_re, y_im;
  int checks = 0, failures = 0;
  r2_bu #(.WL(WL)) dut (.*);
  always #5 clk = ~clk;

  function automatic longint f(longint v, int sh, bit neg);
    longint y;
    y = v >>> sh;
    if (neg) y = -y;
    if (y > 524287) y = 524287;
    if (y < -524288) y = -524288;
    return y;
  endfunction

  initial begin
    longint e[4]; bit ev;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      in_valid = $urandom_range(1); shift = 2'($urandom_range(1)); conj = $urandom_range(1);
      a_re = WL'($urandom); a_im = WL'($urandom); b_re = WL'($urandom); b_im = WL'($urandom);
      e[0] = f(longint'(a_re) + b_re, shift, 0); e[1] = f(longint'(a_im) + b_im, shift, conj);
      e[2] = f(longint'(a_re) - b_re, shift, 0); e[3] = f(longint'(a_im) - b_im, shift, conj);
      ev = in_valid;
      @(negedge clk);
      checks++;
      if (out_valid != ev || (ev && (x_re != e[0] || x_im != e[1] || y_re != e[2] || y_im != e[3]))) begin
        failures++; $display("FAIL: n=%0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
